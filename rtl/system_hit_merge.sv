// system_hit_merge: System Merging Logic of the e/gamma, tau/hadron and jet
// system-level CMMs.
//
// Adder trees add, for each of the 8 threshold sets, the 3-bit crate
// multiplicities of up to four crates (the local crate and up to three remote
// ones) and saturate the result at 7, the width sent to the Central Trigger
// Processor. crate_en selects the crates taking part: all four in the CP, two
// in the JEP. crate_mult[0] is the local crate. One registered stage.
module system_hit_merge
  import cmm_pkg::*;
#(
  parameter int unsigned N_CRATES = 4,
  parameter int unsigned NT       = N_THR
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [N_CRATES-1:0][NT-1:0][MULT_W-1:0] crate_mult,
  input  logic [N_CRATES-1:0]                    crate_en,
  output logic [NT-1:0][MULT_W-1:0]              mult,
  output logic                                   saturated
);

  localparam int unsigned ACC_W = MULT_W + $clog2(N_CRATES + 1);

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
        for (int c = 0; c < N_CRATES; c++)
          if (crate_en[c]) acc += ACC_W'(crate_mult[c][t]);
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
