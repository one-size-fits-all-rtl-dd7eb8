// crate_hit_merge: Crate Merging Logic for hit counting (e/gamma, tau/hadron
// and jet CMMs).
//
// Each of up to 16 CPMs/JEMs reports, for 8 threshold sets, how many clusters
// or jets passed, as a 3-bit number saturated at 7. This block adds the
// numbers of all modules enabled in mod_en for each threshold set and
// saturates the crate total at 7 as well. A CP crate enables 14 modules, a JEP
// crate 16. One registered stage: the sums of the words at mod_data appear at
// mult after the next rising edge. mod_data[m] is {thr7, ..., thr0}, 3 bits
// each, thr0 in the low bits (this design's packing).
module crate_hit_merge
  import cmm_pkg::*;
#(
  parameter int unsigned N_MOD = N_MOD_MAX,
  parameter int unsigned NT    = N_THR
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [N_MOD-1:0][NT-1:0][MULT_W-1:0] mod_data,
  input  logic [N_MOD-1:0]                    mod_en,
  output logic [NT-1:0][MULT_W-1:0]           mult,
  output logic                                saturated  // some threshold clipped at 7
);

  localparam int unsigned ACC_W = MULT_W + $clog2(N_MOD + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mult      <= '0;
      saturated <= 1'b0;
    end else begin
      logic any_sat;
      any_sat = 1'b0;
      for (int t = 0; t < NT; t++) begin
        logic [ACC_W-1:0] acc;
        acc = '0;
        for (int m = 0; m < N_MOD; m++)
          if (mod_en[m]) acc += ACC_W'(mod_data[m][t]);
        if (acc > ACC_W'(MULT_MAX)) begin
          mult[t] <= MULT_W'(MULT_MAX);
          any_sat = 1'b1;
        end else begin
          mult[t] <= MULT_W'(acc);
        end
      end
      saturated <= any_sat;
    end
  end

endmodule
