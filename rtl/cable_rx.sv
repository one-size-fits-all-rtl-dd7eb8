// cable_rx: Cable Receiving Logic of a system-level CMM.
//
// Up to three parallel LVDS cables of 25 bits (24 data bits and an odd parity
// bit) bring the crate results of remote crate-level CMMs. Since they arrive
// from another crate with an unknown phase, each cable word passes through two
// registers on the board clock before use, and its parity is checked on the
// re-timed word. Latency: two rising edges from cable_in to data / par_err.
// The re-timing follows the design; the two-register scheme and parity are
// this design's choices.
module cable_rx
  import cmm_pkg::*;
#(
  parameter int unsigned N_CABLES = N_CABLES_IN,
  parameter int unsigned W        = CABLE_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N_CABLES-1:0][W-1:0]   cable_in,
  output logic [N_CABLES-1:0][W-2:0]   data,
  output logic [N_CABLES-1:0]          par_err
);

  logic [N_CABLES-1:0][W-1:0] meta, sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // reset to the idle word: zero data with its parity bit set
      for (int c = 0; c < N_CABLES; c++) begin
        meta[c] <= {1'b1, {(W-1){1'b0}}};
        sync[c] <= {1'b1, {(W-1){1'b0}}};
      end
    end else begin
      meta <= cable_in;
      sync <= meta;
    end
  end

  always_comb
    for (int c = 0; c < N_CABLES; c++) begin
      data[c]    = sync[c][W-2:0];
      par_err[c] = ~(^sync[c]);
    end

endmodule
