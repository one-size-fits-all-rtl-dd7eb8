// tb_backplane_rx: drives each of the 16 backplane words so that it is valid
// only around the clock edge its phase_sel selects (around the falling edge
// for phase 1, around the rising edge for phase 0) and junk the rest of the
// cycle. The receiver must deliver the valid word two rising edges after the
// cycle it was launched in, with a parity flag that matches the word.
module tb_backplane_rx;
  import cmm_pkg::*;

  localparam int N = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N*MOD_W-1:0]        bp_data;
  logic [N-1:0]              phase_sel;
  logic [N-1:0][MOD_W-2:0]   mod_data;
  logic [N-1:0]              par_err;
  int checks = 0, failures = 0, n_err_seen = 0;

  backplane_rx dut (.clk, .rst_n, .bp_data, .phase_sel, .mod_data, .par_err);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0][MOD_W-1:0] good [4];
  logic [N-1:0][MOD_W-1:0] junk;

  function automatic logic [MOD_W-1:0] rand_word(input bit bad);
    logic [MOD_W-2:0] d;
    d = (MOD_W-1)'($urandom);
    return {odd_parity(d) ^ bad, d};
  endfunction

  initial begin
    bp_data = '0;
    phase_sel = 16'hA5C3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(posedge clk);
      #1;
      // check the word launched two cycles ago
      if (cyc >= 2) begin
        for (int m = 0; m < N; m++) begin
          checks++;
          if (mod_data[m] !== good[(cyc - 2) % 4][m][MOD_W-2:0] ||
              par_err[m] !== (~^good[(cyc - 2) % 4][m])) begin
            failures++;
            if (failures < 10) $display("cyc %0d mod %0d: got %h err %b", cyc, m, mod_data[m], par_err[m]);
          end
          if (par_err[m]) n_err_seen++;
        end
      end
      for (int m = 0; m < N; m++) begin
        good[cyc % 4][m] = rand_word(($urandom % 8) == 0);
        junk[m] = rand_word(1'b0);
      end
      for (int m = 0; m < N; m++)
        bp_data[m*MOD_W +: MOD_W] = phase_sel[m] ? good[cyc % 4][m] : junk[m];
      @(negedge clk);
      #1;
      for (int m = 0; m < N; m++)
        bp_data[m*MOD_W +: MOD_W] = phase_sel[m] ? junk[m] : good[cyc % 4][m];
    end
    checks++;
    if (n_err_seen == 0) failures++;  // parity errors must have been exercised
    $display("parity errors flagged: %0d", n_err_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
