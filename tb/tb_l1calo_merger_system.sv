// tb_l1calo_merger_system: end-to-end test of the full merger layer with all
// parameters at their defaults: 4 CP crates and 2 JEP crates, 12 CMMs.
//
// The JEMs' 12-bit energy sums enter uncompressed and are encoded in the top.
// Over VME-- it reads every CMM's module type, loads the missing-Et LUT and the
// total-Et thresholds of the energy system CMM, the jet threshold values and
// jet-Et thresholds of the jet system CMM, and switches one crate-level CMM to
// falling-edge capture. It then drives random backplane data into all twelve
// CMMs, one bunch crossing per clock, and compares the four CTP outputs with a
// reference model 9 clocks after each crossing is launched (8 clocks of CMM
// latency from data valid at a rising edge). It counts the mechanisms seen:
// crate and system clipping at 7, JEM sums that lose bits to the 6+2-bit
// energy code, falling-edge capture,
// total-Et, missing-Et and jet-Et hits, missing-Et overflow, and a backplane
// parity error flagged and cleared over VME--.
module tb_l1calo_merger_system;
  import cmm_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_CRATES = 6;
  localparam int N_CMM = 12;
  localparam int LAT = 9;
  localparam int N_BC = 400;
  localparam int ET_THR [4] = '{100, 800, 5000, 40000};
  localparam int JET_VAL [8] = '{10, 20, 30, 50, 70, 100, 150, 200};
  localparam int JET_ET_THR [4] = '{50, 200, 600, 1500};

  logic clk = 1'b0, sysreset_n = 1'b0;
  logic [BP_LINKS-1:0] bp_data [N_CMM];
  logic [23:1] vme_a [N_CRATES];
  logic [15:0] vme_d_in [N_CRATES], vme_d_out [N_CRATES];
  logic vme_ds0_n [N_CRATES], vme_write_n [N_CRATES], vme_dtack_n [N_CRATES];
  logic [CTP_W-1:0] cp_em_ctp, cp_tau_ctp, jet_ctp, energy_ctp;

  logic [N_MOD_CP*MOD_W-1:0] cp_bp [4][2];
  logic [BP_LINKS-1:0] jet_bp [2];
  jem_sums_t jem_sums [2][16];

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int pos = 0; pos < 2; pos++) cp_bp[c][pos] = bp_data[2 * c + pos][N_MOD_CP*MOD_W-1:0];
    for (int j = 0; j < 2; j++) jet_bp[j] = bp_data[8 + 2 * j];
  end

  l1calo_merger_system dut (.clk, .sysreset_n, .cp_bp, .jet_bp, .jem_sums, .vme_a, .vme_d_in, .vme_d_out,
    .vme_ds0_n, .vme_write_n, .vme_dtack_n, .cp_em_ctp, .cp_tau_ctp, .jet_ctp, .energy_ctp);

  for (genvar c = 0; c < N_CRATES; c++) begin : g_vme
    vme_master u_m (.clk, .vme_a(vme_a[c]), .vme_d_in(vme_d_in[c]), .vme_d_out(vme_d_out[c]),
      .vme_ds0_n(vme_ds0_n[c]), .vme_write_n(vme_write_n[c]), .vme_dtack_n(vme_dtack_n[c]));
  end

  always #12.5 clk = ~clk;  // 40 MHz

  int checks = 0, failures = 0;
  int n_crate_sat = 0, n_sys_sat = 0, n_compressed = 0, n_phase1 = 0;
  int n_et_hit = 0, n_met_hit = 0, n_met_ovf = 0, n_jet_et_hit = 0, n_parity = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vme(input int crate, input logic [4:0] slot, input logic [15:0] addr,
                     input bit wr, inout logic [15:0] data);
    bit ok;
    logic [23:0] a;
    a = {3'b000, slot, addr};
    case (crate)
      0: if (wr) g_vme[0].u_m.write(a, data, ok); else g_vme[0].u_m.read(a, data, ok);
      1: if (wr) g_vme[1].u_m.write(a, data, ok); else g_vme[1].u_m.read(a, data, ok);
      2: if (wr) g_vme[2].u_m.write(a, data, ok); else g_vme[2].u_m.read(a, data, ok);
      3: if (wr) g_vme[3].u_m.write(a, data, ok); else g_vme[3].u_m.read(a, data, ok);
      4: if (wr) g_vme[4].u_m.write(a, data, ok); else g_vme[4].u_m.read(a, data, ok);
      default: if (wr) g_vme[5].u_m.write(a, data, ok); else g_vme[5].u_m.read(a, data, ok);
    endcase
    checks++;
    if (!ok) begin
      failures++;
      $display("VME cycle to crate %0d slot %0d addr %h not acknowledged", crate, slot, addr);
    end
  endtask

  task automatic vme_wr(input int crate, input logic [4:0] slot, input logic [15:0] addr,
                        input logic [15:0] data);
    logic [15:0] d = data;
    vme(crate, slot, addr, 1'b1, d);
  endtask

  task automatic vme_expect(input int crate, input logic [4:0] slot, input logic [15:0] addr,
                            input logic [15:0] expected, input string what);
    logic [15:0] d = '0;
    vme(crate, slot, addr, 1'b0, d);
    checks++;
    if (d !== expected) begin
      failures++;
      $display("%s: crate %0d slot %0d addr %h read %h expected %h", what, crate, slot, addr, d, expected);
    end
  endtask

  function automatic logic [4:0] slot_of(input int pos);
    return pos == 0 ? 5'd3 : 5'd20;
  endfunction

  // expected CTP words per bunch crossing
  logic [CTP_W-1:0] exp_em [N_BC], exp_tau [N_BC], exp_jet [N_BC], exp_en [N_BC];

  initial begin
    logic [15:0] d;
    for (int i = 0; i < N_CMM; i++)
      for (int m = 0; m < 16; m++) bp_data[i][25*m +: 25] = with_parity(24'd0);
    for (int j = 0; j < 2; j++)
      for (int m = 0; m < 16; m++) jem_sums[j][m] = '0;
    repeat (4) @(posedge clk);
    sysreset_n = 1'b1;
    repeat (4) @(posedge clk);

    // module types from the geographical address
    for (int i = 0; i < N_CMM; i++) begin
      int c, pos;
      bit jep, sys;
      c = i / 2; pos = i % 2;
      jep = c >= 4; sys = (c == 0 || c == 4);
      vme_expect(c, slot_of(pos), REG_ID, 16'({1'b1, jep, sys, 2'((jep ? 2 : 0) + pos)}), "module type");
    end
    // a slot that is not a CMM gets no acknowledge: checked with a read to slot 7
    begin
      bit ok;
      logic [15:0] dd;
      g_vme[1].u_m.read({8'd7, 16'h0000}, dd, ok);
      checks++;
      if (ok) begin failures++; $display("slot 7 acknowledged"); end
    end

    // energy system CMM: thresholds and LUT
    for (int i = 0; i < 4; i++) vme_wr(4, 5'd20, REG_ET_THR + 16'(2 * i), 16'(ET_THR[i]));
    for (int a = 0; a < (1 << MET_LUT_AW); a++) vme_wr(4, 5'd20, 16'h8000 | 16'(2 * a), 16'(lut_entry(a)));
    for (int a = 0; a < (1 << MET_LUT_AW); a += 1001)
      vme_expect(4, 5'd20, 16'h8000 | 16'(2 * a), 16'(lut_entry(a)), "LUT read-back");
    vme_expect(4, 5'd20, REG_ET_THR + 16'd4, 16'(ET_THR[2]), "Et threshold");
    // jet system CMM: threshold values and jet-Et thresholds
    for (int t = 0; t < 8; t++) vme_wr(4, 5'd3, REG_JET_VAL + 16'(2 * t), 16'(JET_VAL[t]));
    for (int j = 0; j < 4; j++) vme_wr(4, 5'd3, REG_JET_ET_THR + 16'(2 * j), 16'(JET_ET_THR[j]));
    // local delay at its reset value; falling-edge capture for crate 1 e/gamma
    vme_expect(0, 5'd3, REG_CTRL, 16'h0F03, "control");
    vme_wr(1, 5'd3, REG_PHASE, 16'hFFFF);
    vme_expect(1, 5'd3, REG_PHASE, 16'hFFFF, "phase");
    // clear any error flags
    for (int i = 0; i < N_CMM; i++) vme_wr(i / 2, slot_of(i % 2), REG_BP_ERR, 16'hFFFF);

    // bunch crossings
    for (int k = 0; k < N_BC + LAT; k++) begin
      @(posedge clk);
      #1;
      if (k >= LAT) begin
        int b;
        b = k - LAT;
        checks += 4;
        if (cp_em_ctp !== exp_em[b])   begin failures++; if (failures < 20) $display("BC %0d em %h exp %h", b, cp_em_ctp, exp_em[b]); end
        if (cp_tau_ctp !== exp_tau[b]) begin failures++; if (failures < 20) $display("BC %0d tau %h exp %h", b, cp_tau_ctp, exp_tau[b]); end
        if (jet_ctp !== exp_jet[b])    begin failures++; if (failures < 20) $display("BC %0d jet %h exp %h", b, jet_ctp, exp_jet[b]); end
        if (energy_ctp !== exp_en[b])  begin failures++; if (failures < 20) $display("BC %0d energy %h exp %h", b, energy_ctp, exp_en[b]); end
      end
      if (k < N_BC) begin
        logic [23:0] cr [4];
        logic [23:0] m;
        esum_t e0, e1, es;
        bit ovf;
        logic [11:0] r;
        int busy;
        busy = (k % 4 == 3) ? 30 : 0;
        // CP: e/gamma and tau/hadron
        for (int i = 0; i < 8; i++) begin
          bp_data[i] = make_hit_bp(busy);
          if (k == 50 && i == 4) bp_data[i][25*5 + 24] ^= 1'b1;  // parity error, crate 2 e/gamma, CPM 5
        end
        for (int pos = 0; pos < 2; pos++) begin
          for (int c = 0; c < 4; c++) begin
            cr[c] = ref_crate_hit(bp_data[2 * c + pos], 14);
            for (int t = 0; t < 8; t++) begin
              int raw;
              raw = 0;
              for (int mm = 0; mm < 14; mm++) raw += int'(bp_data[2 * c + pos][25 * mm + 3 * t +: 3]);
              if (raw > 7) n_crate_sat++;
            end
          end
          m = ref_sys_hit(cr, 4);
          for (int t = 0; t < 8; t++) begin
            int raw;
            raw = 0;
            for (int c = 0; c < 4; c++) raw += int'(cr[c][3 * t +: 3]);
            if (raw > 7) n_sys_sat++;
          end
          if (pos == 0) exp_em[k] = CTP_W'(m); else exp_tau[k] = CTP_W'(m);
        end
        // JEP: jets
        bp_data[8]  = make_hit_bp(busy);
        bp_data[10] = make_hit_bp(busy);
        cr[0] = ref_crate_hit(bp_data[8], 16);
        cr[1] = ref_crate_hit(bp_data[10], 16);
        cr[2] = '0;
        cr[3] = '0;
        m = ref_sys_hit(cr, 2);
        exp_jet[k] = CTP_W'({ref_jet_et(m, JET_VAL, JET_ET_THR), m});
        if (exp_jet[k][27:24] != 0) n_jet_et_hit++;
        // JEP: energy
        // JEM sums of 12 bits, in ranges up to 8, 64, 512 or 4096 counts;
        // the reference keeps what the 6+2-bit code keeps of each
        e0 = '{0, 0, 0};
        e1 = '{0, 0, 0};
        for (int j = 0; j < 2; j++)
          for (int mm = 0; mm < 16; mm++) begin
            int rng, et, ex, ey;
            rng = 8 << (3 * ((j == 0) ? k % 4 : (k / 4) % 4));
            et = $urandom % rng;
            ex = int'($urandom % rng) - rng / 2;
            ey = int'($urandom % rng) - rng / 2;
            jem_sums[j][mm] = '{ey: 12'(ey), ex: 12'(ex), et: 12'(et)};
            if (j == 0) begin
              e0.et += compress_u(et); e0.ex += compress_s(ex); e0.ey += compress_s(ey);
            end else begin
              e1.et += compress_u(et); e1.ex += compress_s(ex); e1.ey += compress_s(ey);
            end
            if (compress_u(et) != et) n_compressed++;
          end
        es = '{e0.et + e1.et, e0.ex + e1.ex, e0.ey + e1.ey};
        r = ref_energy(es, ET_THR, ovf);
        exp_en[k] = CTP_W'(r);
        if (ovf) n_met_ovf++;
        else if (r[11:4] != 0) n_met_hit++;
        if (r[3:0] != 0 && r[3:0] != 4'hF) n_et_hit++;
        // crate 1 e/gamma samples on the falling edge: the word is only valid
        // for the first half of the clock, junk afterwards
        @(negedge clk);
        #1;
        bp_data[2] = make_hit_bp(90);
        n_phase1++;
      end
    end

    // parity error flagged on crate 2 e/gamma, CPM 5, and nowhere else checked
    vme_expect(2, 5'd3, REG_BP_ERR, 16'h0020, "parity error flag");
    vme_expect(2, 5'd20, REG_BP_ERR, 16'h0000, "no parity error");
    vme_expect(0, 5'd3, REG_CABLE_ERR, 16'h0000, "no cable error");
    vme_expect(4, 5'd20, REG_CABLE_ERR, 16'h0000, "no cable error");
    vme_wr(2, 5'd3, REG_BP_ERR, 16'h0020);
    vme_expect(2, 5'd3, REG_BP_ERR, 16'h0000, "parity error cleared");
    n_parity++;

    $display("crate clips %0d, system clips %0d, JEM sums losing bits to compression %0d, falling-edge BCs %0d",
             n_crate_sat, n_sys_sat, n_compressed, n_phase1);
    $display("Et hits %0d, missing-Et hits %0d, missing-Et overflows %0d, jet-Et hits %0d, parity %0d",
             n_et_hit, n_met_hit, n_met_ovf, n_jet_et_hit, n_parity);
    if (n_crate_sat == 0 || n_sys_sat == 0 || n_compressed == 0 || n_phase1 == 0 ||
        n_et_hit == 0 || n_met_hit == 0 || n_met_ovf == 0 || n_jet_et_hit == 0 || n_parity == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
