// jet_et_estimator: approximate total jet Et trigger of the jet system-level
// CMM.
//
// The estimate multiplies the number of jets passing each of the 8 jet
// thresholds by that threshold's value and adds the products; the estimate is
// then compared with N_JET_ET_THR programmable jet-Et thresholds (a hit when
// the estimate exceeds the threshold). The algorithm follows the design; the
// number of jet-Et thresholds, the 8-bit threshold values and the strict
// comparison are this design's choices. One registered stage.
module jet_et_estimator
  import cmm_pkg::*;
#(
  parameter int unsigned NT  = N_THR,
  parameter int unsigned NJT = N_JET_ET_THR
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NT-1:0][MULT_W-1:0]     mult,
  input  logic [NT-1:0][7:0]            thr_value,
  input  logic [NJT-1:0][15:0]          jet_et_thr,
  output logic [NJT-1:0]                hits,
  output logic [15:0]                   estimate
);

  logic [15:0] est_c;

  always_comb begin
    est_c = '0;
    for (int t = 0; t < NT; t++) est_c += 16'(mult[t]) * 16'(thr_value[t]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hits     <= '0;
      estimate <= '0;
    end else begin
      estimate <= est_c;
      for (int j = 0; j < NJT; j++) hits[j] <= (est_c > jet_et_thr[j]);
    end
  end

endmodule
