// tb_crate_hit_merge: random multiplicities from 16 modules, with CP (14
// modules) and JEP (16 modules) enables and random masks; expects the
// per-threshold sum clipped at 7 one clock later, and a result every clock.
module tb_crate_hit_merge;
  import cmm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0][N_THR-1:0][MULT_W-1:0] mod_data;
  logic [15:0] mod_en;
  logic [N_THR-1:0][MULT_W-1:0] mult;
  logic saturated;
  int checks = 0, failures = 0, n_sat = 0;

  crate_hit_merge dut (.clk, .rst_n, .mod_data, .mod_en, .mult, .saturated);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mod_data = '0;
    mod_en = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 1000; it++) begin
      int exp_sum [N_THR];
      bit exp_sat;
      @(negedge clk);
      case (it % 3)
        0: mod_en = 16'h3FFF;
        1: mod_en = 16'hFFFF;
        default: mod_en = 16'($urandom);
      endcase
      for (int m = 0; m < 16; m++)
        for (int t = 0; t < N_THR; t++)
          // mostly small numbers so that unclipped sums occur too
          mod_data[m][t] = (it % 2) ? 3'($urandom % 2) : 3'($urandom);
      exp_sat = 0;
      for (int t = 0; t < N_THR; t++) begin
        exp_sum[t] = 0;
        for (int m = 0; m < 16; m++) if (mod_en[m]) exp_sum[t] += int'(mod_data[m][t]);
        if (exp_sum[t] > 7) begin exp_sum[t] = 7; exp_sat = 1; end
      end
      @(posedge clk);
      #1;
      for (int t = 0; t < N_THR; t++) begin
        checks++;
        if (int'(mult[t]) != exp_sum[t]) begin
          failures++;
          if (failures < 10) $display("it %0d thr %0d: got %0d exp %0d", it, t, mult[t], exp_sum[t]);
        end
      end
      checks++;
      if (saturated !== exp_sat) failures++;
      if (exp_sat) n_sat++;
    end
    checks++;
    if (n_sat == 0 || n_sat == 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
