// tb_cable_rx: random cable words, some with bad parity, on three cables;
// the data and parity flag must come out two rising edges later.
module tb_cable_rx;
  import cmm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0][CABLE_W-1:0] cable_in;
  logic [2:0][CABLE_W-2:0] data;
  logic [2:0] par_err;
  logic [2:0][CABLE_W-1:0] hist [4];
  int checks = 0, failures = 0, n_err = 0;

  cable_rx dut (.clk, .rst_n, .cable_in, .data, .par_err);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cable_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 500; cyc++) begin
      @(negedge clk);
      if (cyc >= 2)
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (data[c] !== hist[(cyc - 2) % 4][c][CABLE_W-2:0] ||
              par_err[c] !== ~(^hist[(cyc - 2) % 4][c])) failures++;
          if (par_err[c]) n_err++;
        end
      for (int c = 0; c < 3; c++) begin
        logic [CABLE_DATA_W-1:0] d;
        d = CABLE_DATA_W'($urandom);
        cable_in[c] = {odd_parity(d) ^ (($urandom % 10) == 0), d};
      end
      hist[cyc % 4] = cable_in;
    end
    checks++;
    if (n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
