// backplane_rx: Backplane Receiving Logic of the CMM.
//
// The CMM receives up to 400 single-ended backplane links at 40 MHz: one
// 25-bit word from each of up to 16 CPMs or JEMs (24 data bits and an odd
// parity bit). Because each source module's data arrive with their own skew,
// each word can be captured either on the rising edge (phase_sel=0) or on the
// falling edge (phase_sel=1) of the board clock, whichever lies clear of the
// data transitions. The falling-edge copy is moved to the rising edge by one
// more register and the chosen copy is registered once again, so both paths
// have the same latency: a word launched just after rising edge n and valid
// around falling edge n+1/2 (phase 1), or around rising edge n+1 (phase 0),
// appears at mod_data after rising edge n+2. A parity error per source is flagged in the same cycle as
// its data. Re-timing onto the board clock follows the design; the edge choice
// as the re-timing mechanism and the parity bit are this design's choices.
module backplane_rx
  import cmm_pkg::*;
#(
  parameter int unsigned N_MOD = N_MOD_MAX,
  parameter int unsigned W     = MOD_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_MOD*W-1:0]        bp_data,
  input  logic [N_MOD-1:0]          phase_sel,
  output logic [N_MOD-1:0][W-2:0]   mod_data,
  output logic [N_MOD-1:0]          par_err
);

  logic [N_MOD-1:0][W-1:0] cap_pos, cap_neg, cap_neg_r;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cap_pos <= '0;
    else        cap_pos <= bp_data;

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) cap_neg <= '0;
    else        cap_neg <= bp_data;

  // the falling-edge copy is brought onto the rising edge once more so that
  // both capture paths have the same latency
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cap_neg_r <= '0;
    else        cap_neg_r <= cap_neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mod_data <= '0;
      par_err  <= '0;
    end else begin
      for (int m = 0; m < N_MOD; m++) begin
        logic [W-1:0] w;
        w = phase_sel[m] ? cap_neg_r[m] : cap_pos[m];
        mod_data[m] <= w[W-2:0];
        par_err[m]  <= ~(^w);  // odd parity expected over all W bits
      end
    end
  end

endmodule
