// tb_pipeline_delay: for every delay setting 0..15, a random stream must come
// out exactly that many clocks later.
module tb_pipeline_delay;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [49:0] din, dout;
  logic [3:0]  delay;
  logic [49:0] hist [64];
  int checks = 0, failures = 0;

  pipeline_delay #(.W(50), .MAX_DELAY(15)) dut (.clk, .rst_n, .din, .delay, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    delay = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < 16; d++) begin
      delay = 4'(d);
      for (int cyc = 0; cyc < 60; cyc++) begin
        @(negedge clk);
        din = {18'($urandom), 32'($urandom)};
        hist[cyc] = din;
        #1;
        if (cyc >= d + 1) begin
          checks++;
          if (dout !== hist[cyc - d]) begin
            failures++;
            if (failures < 10) $display("delay %0d cyc %0d mismatch", d, cyc);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
