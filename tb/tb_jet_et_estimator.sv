// tb_jet_et_estimator: random jet multiplicities, threshold values and jet-Et
// thresholds; expects sum(mult * value) and the four comparisons one clock
// later.
module tb_jet_et_estimator;
  import cmm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_THR-1:0][MULT_W-1:0] mult;
  logic [N_THR-1:0][7:0] thr_value;
  logic [3:0][15:0] jet_et_thr;
  logic [3:0] hits;
  logic [15:0] estimate;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  jet_et_estimator dut (.clk, .rst_n, .mult, .thr_value, .jet_et_thr, .hits, .estimate);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mult = '0; thr_value = '0; jet_et_thr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 1000; it++) begin
      int est;
      @(negedge clk);
      mult = 24'($urandom);
      thr_value = {$urandom, $urandom};
      for (int j = 0; j < 4; j++) jet_et_thr[j] = 16'($urandom % 6000);
      est = 0;
      for (int t = 0; t < N_THR; t++) est += int'(mult[t]) * int'(thr_value[t]);
      @(posedge clk);
      #1;
      checks++;
      if (int'(estimate) != est) failures++;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (hits[j] !== (est > int'(jet_et_thr[j]))) failures++;
        if (hits[j]) n_hit++; else n_miss++;
      end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
