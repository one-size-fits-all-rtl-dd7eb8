// cmm_config: decodes a CMM's geographical address into its module type.
//
// Every CMM carries every configuration; which one it runs is chosen from the
// crate and slot it sits in. Crates 0..N_CP_CRATES-1 are Cluster Processor
// crates (14 CPMs), the next N_JEP_CRATES are Jet/Energy crates (16 JEMs).
// Each crate has two CMM slots: in CP crates slot A is e/gamma and slot B is
// tau/hadron, in JEP crates slot A is jet counting and slot B energy summing.
// The CMMs in one crate per subsystem (CP_SYS_CRATE, JEP_SYS_CRATE) are the
// system-level ones. The set of module types follows the design; the slot
// numbers and which crate is the system crate are this design's choices, set by
// parameters. Purely combinational; cfg.valid is low for any other address.
module cmm_config
  import cmm_pkg::*;
#(
  parameter int unsigned N_CP_CRATES   = 4,
  parameter int unsigned N_JEP_CRATES  = 2,
  parameter logic [4:0]  CMM_SLOT_A    = 5'd3,
  parameter logic [4:0]  CMM_SLOT_B    = 5'd20,
  parameter logic [3:0]  CP_SYS_CRATE  = 4'd0,
  parameter logic [3:0]  JEP_SYS_CRATE = 4'(N_CP_CRATES)
) (
  input  logic [3:0] geo_crate,
  input  logic [4:0] geo_slot,
  output cmm_cfg_t   cfg
);

  always_comb begin
    logic slot_a, slot_b, cp, jep;
    slot_a = (geo_slot == CMM_SLOT_A);
    slot_b = (geo_slot == CMM_SLOT_B);
    cp     = (32'(geo_crate) < N_CP_CRATES);
    jep    = !cp && (32'(geo_crate) < N_CP_CRATES + N_JEP_CRATES);
    cfg.valid     = (slot_a || slot_b) && (cp || jep);
    cfg.is_jep    = jep;
    cfg.is_system = cp ? (geo_crate == CP_SYS_CRATE) : (geo_crate == JEP_SYS_CRATE);
    if (jep) cfg.func = slot_a ? FUNC_JET : FUNC_ENERGY;
    else     cfg.func = slot_a ? FUNC_EM  : FUNC_TAU;
  end

endmodule
