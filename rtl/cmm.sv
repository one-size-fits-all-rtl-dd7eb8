// cmm: the Common Merger Module.
//
// One board design serves as every merger module of the CP and JEP trigger
// subsystems: e/gamma, tau/hadron or jet hit counting, or Et/Ex/Ey summing,
// each at crate level or at system level. The module type is decoded from the
// geographical address (cmm_config); all of the function logic is present and
// the type selects which results are used, in place of loading a different
// FPGA configuration. The data path is:
//
//   backplane (400 links) -> backplane_rx -> crate_hit_merge / crate_energy_merge
//     -> crate result, 2 x 25 bits (24 data + odd parity each)
//        -> cable_out (to the system-level CMM of another crate)
//        -> pipeline_delay (local path of a system-level CMM)
//   cable_in (3 x 25 bits) -> cable_rx (remote crates)
//   local + remote -> system_hit_merge (+ jet_et_estimator) / system_energy_merge
//     -> ctp_out (system-level CMMs only)
//
// Crate result format (this design's): hit counting uses cable 0 with the 8 x
// 3-bit multiplicities; energy uses cable 0 = {Ex[7:0], Et[15:0]} and cable 1 =
// {Ey[15:0], Ex[15:8]}. CTP word: hit counting [23:0] = 8 x 3-bit
// multiplicities, jet adds [27:24] = jet-Et hits; energy [3:0] = total-Et hits,
// [11:4] = missing-Et hits. Crate-level CMMs drive ctp_out to zero.
//
// Timing, all on the 40 MHz clock: backplane data present before rising edge
// n give the crate result on cable_out after edge n+3 and the system result on
// ctp_out after edge n+8 when the remote cables arrive with no extra delay and
// the local delay is 3 (its reset value). Registers are reached over VME--; see
// cmm_pkg for the map. Reset: rst_n is the crate's SYSRESET*. The parity bits
// of the delayed local word and bit 16 of the system sums are not read: the
// local word never leaves the board, and only the low 16 bits are monitored.
module cmm
  import cmm_pkg::*;
#(
  parameter int unsigned N_CP_CRATES   = 4,
  parameter int unsigned N_JEP_CRATES  = 2,
  parameter logic [3:0]  CP_SYS_CRATE  = 4'd0,
  parameter logic [3:0]  JEP_SYS_CRATE = 4'd4,
  parameter logic [3:0]  LOCAL_DELAY_DEFAULT = 4'd3
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [3:0]                           geo_crate,
  input  logic [4:0]                           geo_slot,
  input  logic [BP_LINKS-1:0]                  bp_data,
  input  logic [N_CABLES_IN-1:0][CABLE_W-1:0]  cable_in,
  output logic [N_CABLES_OUT-1:0][CABLE_W-1:0] cable_out,
  output logic [CTP_W-1:0]                     ctp_out,
  input  logic [23:1]                          vme_a,
  input  logic [15:0]                          vme_d_in,
  output logic [15:0]                          vme_d_out,
  input  logic                                 vme_ds0_n,
  input  logic                                 vme_write_n,
  output logic                                 vme_dtack_n
);

  // ---------------------------------------------------------------- type
  cmm_cfg_t cfg;
  cmm_config #(
    .N_CP_CRATES(N_CP_CRATES), .N_JEP_CRATES(N_JEP_CRATES),
    .CP_SYS_CRATE(CP_SYS_CRATE), .JEP_SYS_CRATE(JEP_SYS_CRATE)
  ) u_config (.geo_crate, .geo_slot, .cfg);

  logic is_energy;
  assign is_energy = (cfg.func == FUNC_ENERGY);

  // ---------------------------------------------------------------- registers
  logic [15:1] bus_addr;
  logic [15:0] bus_wdata, bus_rdata, reg_rdata;
  logic        bus_wr, bus_rd, lut_sel_q;

  logic [3:0]  local_delay;
  logic [3:0]  crate_en_reg;
  logic [15:0] phase_sel;
  logic [15:0] mod_en_reg;
  logic [15:0] bp_err;
  logic [2:0]  cable_err;
  logic [N_ET_THR-1:0][15:0]     et_thr;
  logic [N_THR-1:0][7:0]         jet_val;
  logic [N_JET_ET_THR-1:0][15:0] jet_et_thr;
  logic [N_MET_THR-1:0]          lut_rdata;
  // status read back over VME--
  logic        crate_sat, sys_sat, met_ovf;
  logic [15:0] jet_et_est;
  logic [SYS_SUM_W-1:0] sys_et;
  logic signed [SYS_SUM_W-1:0] sys_ex, sys_ey;

  vme_slave u_vme (
    .clk, .rst_n, .geo_slot,
    .vme_a, .vme_d_in, .vme_d_out, .vme_ds0_n, .vme_write_n, .vme_dtack_n,
    .bus_addr, .bus_wdata, .bus_wr, .bus_rd, .bus_rdata
  );

  logic        lut_area;
  logic [15:0] byte_addr;
  assign byte_addr = {bus_addr, 1'b0};
  assign lut_area  = byte_addr[15];

  logic [N_MOD_MAX-1:0] bp_par_err, mod_en;
  logic [N_CABLES_IN-1:0] cab_par_err, cable_used;
  logic [3:0] crate_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      local_delay <= LOCAL_DELAY_DEFAULT;
      crate_en_reg <= '1;
      phase_sel   <= '0;
      mod_en_reg  <= '1;
      bp_err      <= '0;
      cable_err   <= '0;
      et_thr      <= '1;
      jet_val     <= '0;
      jet_et_thr  <= '1;
      reg_rdata   <= '0;
      lut_sel_q   <= 1'b0;
    end else begin
      // sticky error flags, cleared by writing ones
      bp_err    <= bp_err    | (bp_par_err & mod_en);
      cable_err <= cable_err | (cab_par_err & cable_used & {3{cfg.is_system}});
      if (bus_wr && !lut_area) begin
        unique casez (byte_addr)
          REG_CTRL:   {crate_en_reg, local_delay} <= {bus_wdata[11:8], bus_wdata[3:0]};
          REG_PHASE:  phase_sel  <= bus_wdata;
          REG_MOD_EN: mod_en_reg <= bus_wdata;
          REG_BP_ERR: bp_err     <= (bp_err & ~bus_wdata) | (bp_par_err & mod_en);
          REG_CABLE_ERR: cable_err <= (cable_err & ~bus_wdata[2:0]) | (cab_par_err & cable_used & {3{cfg.is_system}});
          16'b0000_0000_0001_0???: et_thr[byte_addr[2:1]] <= bus_wdata;
          16'b0000_0000_0010_????: jet_val[byte_addr[3:1]] <= bus_wdata[7:0];
          16'b0000_0000_0011_0???: jet_et_thr[byte_addr[2:1]] <= bus_wdata;
          default: ;
        endcase
      end
      if (bus_rd) begin
        lut_sel_q <= lut_area;
        unique casez (byte_addr)
          REG_ID:     reg_rdata <= 16'({cfg.valid, cfg.is_jep, cfg.is_system, cfg.func});
          REG_CTRL:   reg_rdata <= {4'b0, crate_en_reg, 4'b0, local_delay};
          REG_PHASE:  reg_rdata <= phase_sel;
          REG_MOD_EN: reg_rdata <= mod_en_reg;
          REG_BP_ERR: reg_rdata <= bp_err;
          REG_CABLE_ERR: reg_rdata <= {13'b0, cable_err};
          REG_STATUS: reg_rdata <= {13'b0, met_ovf, sys_sat, crate_sat};
          REG_JET_EST: reg_rdata <= jet_et_est;
          REG_SYS_ET: reg_rdata <= sys_et[15:0];
          REG_SYS_EX: reg_rdata <= sys_ex[15:0];
          REG_SYS_EY: reg_rdata <= sys_ey[15:0];
          16'b0000_0000_0001_0???: reg_rdata <= et_thr[byte_addr[2:1]];
          16'b0000_0000_0010_????: reg_rdata <= {8'b0, jet_val[byte_addr[3:1]]};
          16'b0000_0000_0011_0???: reg_rdata <= jet_et_thr[byte_addr[2:1]];
          default:    reg_rdata <= '0;
        endcase
      end
    end
  end

  assign bus_rdata = lut_sel_q ? {8'b0, lut_rdata} : reg_rdata;

  // CP crates hold 14 CPMs, JEP crates 16 JEMs; the CP has four crates, the JEP two.
  assign mod_en   = mod_en_reg & (cfg.is_jep ? 16'hFFFF : 16'h3FFF);
  assign crate_en = crate_en_reg & (cfg.is_jep ? 4'b0011 : 4'b1111);
  assign cable_used = is_energy ? {1'b0, {2{crate_en[1]}}} : crate_en[3:1];

  // ---------------------------------------------------------------- crate level
  logic [N_MOD_MAX-1:0][MOD_DATA_W-1:0] mod_data;

  backplane_rx u_bp_rx (
    .clk, .rst_n, .bp_data, .phase_sel, .mod_data, .par_err(bp_par_err)
  );

  logic [N_THR-1:0][MULT_W-1:0] crate_mult;
  crate_sums_t crate_sums;

  crate_hit_merge u_crate_hit (
    .clk, .rst_n, .mod_data(mod_data), .mod_en, .mult(crate_mult), .saturated(crate_sat)
  );

  crate_energy_merge u_crate_energy (
    .clk, .rst_n, .mod_data(mod_data), .mod_en, .sums(crate_sums)
  );

  logic [N_CABLES_OUT-1:0][CABLE_DATA_W-1:0] crate_word;
  logic [N_CABLES_OUT-1:0][CABLE_W-1:0]      crate_cable;

  always_comb begin
    if (is_energy) begin
      crate_word[0] = crate_sums[23:0];
      crate_word[1] = crate_sums[47:24];
    end else begin
      crate_word[0] = crate_mult;
      crate_word[1] = '0;
    end
    for (int c = 0; c < N_CABLES_OUT; c++)
      crate_cable[c] = {odd_parity(crate_word[c]), crate_word[c]};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cable_out <= '0;
      for (int c = 0; c < N_CABLES_OUT; c++) cable_out[c][CABLE_W-1] <= 1'b1;
    end else begin
      cable_out <= crate_cable;
    end

  // ---------------------------------------------------------------- system level
  logic [N_CABLES_IN-1:0][CABLE_DATA_W-1:0] remote;
  cable_rx u_cable_rx (.clk, .rst_n, .cable_in, .data(remote), .par_err(cab_par_err));

  logic [LOCAL_W-1:0] local_d;
  pipeline_delay #(.W(LOCAL_W), .MAX_DELAY(15)) u_delay (
    .clk, .rst_n, .din(crate_cable), .delay(local_delay), .dout(local_d)
  );

  logic [N_CABLES_OUT-1:0][CABLE_DATA_W-1:0] local_word;
  assign local_word[0] = local_d[CABLE_DATA_W-1:0];
  assign local_word[1] = local_d[CABLE_W +: CABLE_DATA_W];

  logic [N_THR-1:0][MULT_W-1:0] sys_mult, sys_mult_q;
  system_hit_merge u_sys_hit (
    .clk, .rst_n,
    .crate_mult({remote[2], remote[1], remote[0], local_word[0]}),
    .crate_en, .mult(sys_mult), .saturated(sys_sat)
  );

  logic [N_JET_ET_THR-1:0] jet_et_hits;
  jet_et_estimator u_jet_et (
    .clk, .rst_n, .mult(sys_mult), .thr_value(jet_val), .jet_et_thr,
    .hits(jet_et_hits), .estimate(jet_et_est)
  );

  logic [N_ET_THR-1:0]  et_hits;
  logic [N_MET_THR-1:0] met_hits;
  system_energy_merge u_sys_energy (
    .clk, .rst_n,
    .local_sums({local_word[1], local_word[0]}),
    .remote_sums({remote[1], remote[0]}),
    .crate_en(crate_en[1:0]), .et_thr,
    .lut_we(bus_wr && lut_area), .lut_addr(bus_addr[MET_LUT_AW:1]),
    .lut_wdata(bus_wdata[N_MET_THR-1:0]), .lut_rdata,
    .et_hits, .met_hits, .met_overflow(met_ovf), .sys_et, .sys_ex, .sys_ey
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sys_mult_q <= '0;
      ctp_out    <= '0;
    end else begin
      sys_mult_q <= sys_mult;
      if (!(cfg.valid && cfg.is_system))  ctp_out <= '0;
      else if (is_energy)                 ctp_out <= CTP_W'({met_hits, et_hits});
      else if (cfg.func == FUNC_JET)      ctp_out <= CTP_W'({jet_et_hits, sys_mult_q});
      else                                ctp_out <= CTP_W'(sys_mult_q);
    end
  end

endmodule
