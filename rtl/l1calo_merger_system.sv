// l1calo_merger_system: the merger layer of the calorimeter trigger, built
// from twelve identical Common Merger Modules.
//
// The Cluster Processor has N_CP_CRATES (4) crates of 14 CPMs and the
// Jet/Energy-sum Processor N_JEP_CRATES (2) crates of 16 JEMs. Each crate holds
// two CMMs, in slots A and B: e/gamma and tau/hadron in the CP, jet and energy
// in the JEP. Every CMM runs crate-level merging of its own crate; the CMMs in
// the first crate of each subsystem are also the system-level ones. The other
// crates' CMMs send their crate results over cables: CP crate k (k = 1..3)
// feeds cable input k-1 of the matching CMM in CP crate 0; the jet CMM of the
// second JEP crate feeds cable 0 of the jet CMM in the first, and the energy
// CMM of the second JEP crate feeds cables 0 and 1 of the first energy CMM.
// Unused cable inputs carry an idle word (all zero data, correct parity).
//
// Ports: cp_bp[crate][pos] is the 350-link backplane input (14 CPMs x 25) of
// the CMM in CP crate 'crate', position pos (0 = e/gamma, 1 = tau/hadron);
// the CMM's links for the two absent module slots carry idle words.
// jet_bp[j] is the 400-link input of the jet CMM in JEP crate j. For the energy
// CMMs the top takes the JEMs' uncompressed 12-bit Et, Ex and Ey sums
// (jem_sums[j][m]) and forms each backplane word as a JEM does: three
// jem_energy_encoder codes {Ey, Ex, Et} plus the odd parity bit. Each crate has its own
// VME-- bus; the two CMMs' read data are ORed and their DTACK* ANDed, as on the
// open-collector bus. The four system results leave on cp_em_ctp, cp_tau_ctp,
// jet_ctp and energy_ctp, 8 clock cycles after the backplane data (see cmm).
module l1calo_merger_system
  import cmm_pkg::*;
#(
  parameter int unsigned N_CP_CRATES  = 4,
  parameter int unsigned N_JEP_CRATES = 2,
  parameter logic [4:0]  CMM_SLOT_A   = 5'd3,
  parameter logic [4:0]  CMM_SLOT_B   = 5'd20
) (
  input  logic                   clk,
  input  logic                   sysreset_n,
  input  logic [N_MOD_CP*MOD_W-1:0] cp_bp  [N_CP_CRATES][2],
  input  logic [BP_LINKS-1:0]    jet_bp   [N_JEP_CRATES],
  input  jem_sums_t              jem_sums [N_JEP_CRATES][N_MOD_MAX],
  input  logic [23:1]            vme_a       [N_CP_CRATES+N_JEP_CRATES],
  input  logic [15:0]            vme_d_in    [N_CP_CRATES+N_JEP_CRATES],
  output logic [15:0]            vme_d_out   [N_CP_CRATES+N_JEP_CRATES],
  input  logic                   vme_ds0_n   [N_CP_CRATES+N_JEP_CRATES],
  input  logic                   vme_write_n [N_CP_CRATES+N_JEP_CRATES],
  output logic                   vme_dtack_n [N_CP_CRATES+N_JEP_CRATES],
  output logic [CTP_W-1:0]       cp_em_ctp,
  output logic [CTP_W-1:0]       cp_tau_ctp,
  output logic [CTP_W-1:0]       jet_ctp,
  output logic [CTP_W-1:0]       energy_ctp
);

  localparam int unsigned N_CRATES = N_CP_CRATES + N_JEP_CRATES;
  localparam int unsigned N_CMM    = 2 * N_CRATES;
  localparam logic [CABLE_W-1:0] IDLE_CABLE = {1'b1, {CABLE_DATA_W{1'b0}}};

  logic [N_CABLES_IN-1:0][CABLE_W-1:0]  cable_in  [N_CMM];
  logic [N_CABLES_OUT-1:0][CABLE_W-1:0] cable_out [N_CMM];
  logic [CTP_W-1:0]                     ctp       [N_CMM];
  logic [15:0]                          d_out     [N_CMM];
  logic                                 dtack_n   [N_CMM];

  // Backplane inputs of the twelve CMMs
  localparam logic [MOD_W-1:0] IDLE_WORD = {1'b1, {MOD_DATA_W{1'b0}}};
  logic [BP_LINKS-1:0] bp_data [N_CMM];
  logic [N_MOD_MAX-1:0][MOD_W-1:0] energy_bp [N_JEP_CRATES];

  for (genvar j = 0; j < N_JEP_CRATES; j++) begin : g_jem
    for (genvar m = 0; m < N_MOD_MAX; m++) begin : g_mod
      logic [7:0] et_code, ex_code, ey_code;
      jem_energy_encoder #(.SIGNED(1'b0)) u_et (.value(jem_sums[j][m].et), .code(et_code));
      jem_energy_encoder #(.SIGNED(1'b1)) u_ex (.value(jem_sums[j][m].ex), .code(ex_code));
      jem_energy_encoder #(.SIGNED(1'b1)) u_ey (.value(jem_sums[j][m].ey), .code(ey_code));
      assign energy_bp[j][m] = {odd_parity({ey_code, ex_code, et_code}), ey_code, ex_code, et_code};
    end
  end

  always_comb begin
    for (int c = 0; c < N_CP_CRATES; c++)
      for (int pos = 0; pos < 2; pos++)
        bp_data[2*c + pos] = {{(N_MOD_MAX - N_MOD_CP){IDLE_WORD}}, cp_bp[c][pos]};
    for (int j = 0; j < N_JEP_CRATES; j++) begin
      bp_data[2*(N_CP_CRATES + j)]     = jet_bp[j];
      bp_data[2*(N_CP_CRATES + j) + 1] = energy_bp[j];
    end
  end

  // Cable routing
  always_comb begin
    for (int i = 0; i < N_CMM; i++) cable_in[i] = {N_CABLES_IN{IDLE_CABLE}};
    for (int k = 1; k < N_CP_CRATES && k <= N_CABLES_IN; k++) begin
      cable_in[0][k-1] = cable_out[2*k][0];      // e/gamma
      cable_in[1][k-1] = cable_out[2*k + 1][0];  // tau/hadron
    end
    if (N_JEP_CRATES > 1) begin
      cable_in[2*N_CP_CRATES][0]     = cable_out[2*N_CP_CRATES + 2][0];  // jet
      cable_in[2*N_CP_CRATES + 1][0] = cable_out[2*N_CP_CRATES + 3][0];  // energy
      cable_in[2*N_CP_CRATES + 1][1] = cable_out[2*N_CP_CRATES + 3][1];
    end
  end

  for (genvar i = 0; i < N_CMM; i++) begin : g_cmm
    localparam int unsigned CRATE = i / 2;
    cmm #(
      .N_CP_CRATES(N_CP_CRATES), .N_JEP_CRATES(N_JEP_CRATES),
      .CP_SYS_CRATE(4'd0), .JEP_SYS_CRATE(4'(N_CP_CRATES))
    ) u_cmm (
      .clk, .rst_n(sysreset_n),
      .geo_crate(4'(CRATE)),
      .geo_slot((i % 2 == 0) ? CMM_SLOT_A : CMM_SLOT_B),
      .bp_data(bp_data[i]),
      .cable_in(cable_in[i]),
      .cable_out(cable_out[i]),
      .ctp_out(ctp[i]),
      .vme_a(vme_a[CRATE]), .vme_d_in(vme_d_in[CRATE]), .vme_d_out(d_out[i]),
      .vme_ds0_n(vme_ds0_n[CRATE]), .vme_write_n(vme_write_n[CRATE]),
      .vme_dtack_n(dtack_n[i])
    );
  end

  always_comb
    for (int c = 0; c < N_CRATES; c++) begin
      vme_d_out[c]   = d_out[2*c] | d_out[2*c + 1];
      vme_dtack_n[c] = dtack_n[2*c] & dtack_n[2*c + 1];
    end

  assign cp_em_ctp  = ctp[0];
  assign cp_tau_ctp = ctp[1];
  assign jet_ctp    = ctp[2*N_CP_CRATES];
  assign energy_ctp = ctp[2*N_CP_CRATES + 1];

endmodule
