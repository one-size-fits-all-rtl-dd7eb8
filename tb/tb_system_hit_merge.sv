// tb_system_hit_merge: random crate multiplicities from four crates with CP
// (all four) and JEP (two) crate enables; expects the sums clipped at 7 one
// clock later.
module tb_system_hit_merge;
  import cmm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0][N_THR-1:0][MULT_W-1:0] crate_mult;
  logic [3:0] crate_en;
  logic [N_THR-1:0][MULT_W-1:0] mult;
  logic saturated;
  int checks = 0, failures = 0, n_sat = 0, n_unsat = 0;

  system_hit_merge dut (.clk, .rst_n, .crate_mult, .crate_en, .mult, .saturated);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    crate_mult = '0;
    crate_en = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 1000; it++) begin
      int e [N_THR];
      bit es;
      @(negedge clk);
      crate_en = (it % 2) ? 4'b1111 : ((it % 4 == 0) ? 4'b0011 : 4'($urandom));
      crate_mult = {$urandom, $urandom, $urandom};
      es = 0;
      for (int t = 0; t < N_THR; t++) begin
        e[t] = 0;
        for (int c = 0; c < 4; c++) if (crate_en[c]) e[t] += int'(crate_mult[c][t]);
        if (e[t] > 7) begin e[t] = 7; es = 1; end
      end
      @(posedge clk);
      #1;
      for (int t = 0; t < N_THR; t++) begin
        checks++;
        if (int'(mult[t]) != e[t]) failures++;
      end
      checks++;
      if (saturated !== es) failures++;
      if (es) n_sat++; else n_unsat++;
    end
    checks++;
    if (n_sat == 0 || n_unsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
