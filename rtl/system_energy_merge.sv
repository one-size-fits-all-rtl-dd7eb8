// system_energy_merge: System Merging Logic of the energy system-level CMM.
//
// Stage 1 adds the Et, Ex and Ey sums of the local and the remote JEP crate
// (either can be left out with crate_en) to 17-bit system totals and compares
// the total Et with four programmable thresholds (a hit when Et exceeds the
// threshold). It also prepares the address of the missing-Et look-up table:
// |Ex| and |Ey| are brought to 6 bits each by the smallest common right shift
// of 0, 2, 4 or 6 bits (the same x1/x4/x16/x64 scaling the JEMs use), and the
// 2-bit scale is put in front: address = {scale, |Ex|>>2s, |Ey|>>2s}. Stage 2
// reads the 16k x 8 LUT, whose bit i says whether missing Et passes
// threshold i; if either component is too large for the largest scale every
// missing-Et threshold is taken as passed. Result latency: two rising edges.
// The LUT is a dual-port RAM: port A is written and read by the VME-- bus
// (read data one cycle after the address), port B is read by the trigger path.
// Summing, the 4 total-Et and 8 missing-Et thresholds and the use of a LUT for
// missing Et follow the design. Comparators for total Et, and the LUT
// address format, are this design's choices.
module system_energy_merge
  import cmm_pkg::*;
#(
  parameter int unsigned LUT_AW = MET_LUT_AW
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  crate_sums_t                          local_sums,
  input  crate_sums_t                          remote_sums,
  input  logic [1:0]                           crate_en,   // [0] local, [1] remote
  input  logic [N_ET_THR-1:0][SUM_W-1:0]       et_thr,
  // LUT port A
  input  logic                                 lut_we,
  input  logic [LUT_AW-1:0]                    lut_addr,
  input  logic [N_MET_THR-1:0]                 lut_wdata,
  output logic [N_MET_THR-1:0]                 lut_rdata,
  // results
  output logic [N_ET_THR-1:0]                  et_hits,
  output logic [N_MET_THR-1:0]                 met_hits,
  output logic                                 met_overflow,
  output logic        [SYS_SUM_W-1:0]          sys_et,
  output logic signed [SYS_SUM_W-1:0]          sys_ex,
  output logic signed [SYS_SUM_W-1:0]          sys_ey
);

  localparam int unsigned MAG_BITS = (LUT_AW - 2) / 2;  // 6
  localparam int unsigned DEPTH    = 1 << LUT_AW;

  logic [N_MET_THR-1:0] lut [DEPTH];

  // Stage 1 (combinational part)
  logic        [SYS_SUM_W-1:0] et_c;
  logic signed [SYS_SUM_W-1:0] ex_c, ey_c;
  logic        [SYS_SUM_W-1:0] ax, ay;
  logic [N_ET_THR-1:0]         et_hits_c;
  logic [LUT_AW-1:0]           met_addr_c;
  logic                        ovf_c;

  always_comb begin
    logic found;
    et_c = '0;
    ex_c = '0;
    ey_c = '0;
    if (crate_en[0]) begin
      et_c += SYS_SUM_W'(local_sums.et);
      ex_c += SYS_SUM_W'(local_sums.ex);
      ey_c += SYS_SUM_W'(local_sums.ey);
    end
    if (crate_en[1]) begin
      et_c += SYS_SUM_W'(remote_sums.et);
      ex_c += SYS_SUM_W'(remote_sums.ex);
      ey_c += SYS_SUM_W'(remote_sums.ey);
    end
    for (int i = 0; i < N_ET_THR; i++) et_hits_c[i] = (et_c > SYS_SUM_W'(et_thr[i]));
    ax = ex_c[SYS_SUM_W-1] ? SYS_SUM_W'(-ex_c) : SYS_SUM_W'(ex_c);
    ay = ey_c[SYS_SUM_W-1] ? SYS_SUM_W'(-ey_c) : SYS_SUM_W'(ey_c);
    met_addr_c = '0;
    found = 1'b0;
    for (int s = 0; s < 4; s++) begin
      if (!found && (ax >> (2 * s)) < (1 << MAG_BITS) && (ay >> (2 * s)) < (1 << MAG_BITS)) begin
        met_addr_c = {2'(s), MAG_BITS'(ax >> (2 * s)), MAG_BITS'(ay >> (2 * s))};
        found = 1'b1;
      end
    end
    ovf_c = !found;
  end

  logic [LUT_AW-1:0]   met_addr_q;
  logic                ovf_q;
  logic [N_ET_THR-1:0] et_hits_q;
  logic [N_MET_THR-1:0] lut_b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sys_et     <= '0;
      sys_ex     <= '0;
      sys_ey     <= '0;
      met_addr_q <= '0;
      ovf_q      <= 1'b0;
      et_hits_q  <= '0;
      et_hits    <= '0;
      met_overflow <= 1'b0;
    end else begin
      sys_et     <= et_c;
      sys_ex     <= ex_c;
      sys_ey     <= ey_c;
      met_addr_q <= met_addr_c;
      ovf_q      <= ovf_c;
      et_hits_q  <= et_hits_c;
      et_hits    <= et_hits_q;
      met_overflow <= ovf_q;
    end
  end

  // LUT: port A (VME), port B (trigger path); no reset on RAM contents.
  always_ff @(posedge clk) begin
    if (lut_we) lut[lut_addr] <= lut_wdata;
    lut_rdata <= lut[lut_addr];
    lut_b_q   <= lut[met_addr_q];
  end

  assign met_hits = met_overflow ? '1 : lut_b_q;

endmodule
