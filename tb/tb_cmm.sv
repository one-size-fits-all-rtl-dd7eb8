// tb_cmm: four Common Merger Modules of the same design, set by their
// geographical addresses to four of the module types: e/gamma system
// (crate 0, slot 3), tau/hadron crate-level (crate 2, slot 20), jet
// crate-level (crate 5, slot 3) and energy system (crate 4, slot 20). The
// testbench plays the remote crates: it drives the system CMMs' cable inputs
// with random crate results of its own, launched as a remote crate-level CMM
// would launch them. Checked every bunch crossing: the crate results on
// cable_out (4 clocks after the backplane data are launched), the CTP words of
// the system CMMs (9 clocks, plus any extra cable delay), and zero CTP words
// from the crate-level CMMs. Phase 2 re-programs the local pipeline delay to
// match 2 more clocks of cable delay and leaves crates 1 and 3 out of the
// e/gamma sum. A bad cable parity bit must show in the cable error register,
// and the energy system sums must read back over VME-- at the end.
module tb_cmm;
  import cmm_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_BC = 200;
  localparam int ET_THR [4] = '{300, 2000, 9000, 50000};
  localparam logic [3:0]  CRATE [4] = '{4'd0, 4'd2, 4'd5, 4'd4};
  localparam logic [4:0]  SLOT  [4] = '{5'd3, 5'd20, 5'd3, 5'd20};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BP_LINKS-1:0] bp [4];
  logic [2:0][24:0] cable_in [4];
  logic [1:0][24:0] cable_out [4];
  logic [31:0] ctp [4];
  logic [23:1] vme_a [4];
  logic [15:0] vme_d_in [4], vme_d_out [4];
  logic vme_ds0_n [4], vme_write_n [4], vme_dtack_n [4];

  for (genvar i = 0; i < 4; i++) begin : g
    cmm u_cmm (.clk, .rst_n, .geo_crate(CRATE[i]), .geo_slot(SLOT[i]), .bp_data(bp[i]),
      .cable_in(cable_in[i]), .cable_out(cable_out[i]), .ctp_out(ctp[i]),
      .vme_a(vme_a[i]), .vme_d_in(vme_d_in[i]), .vme_d_out(vme_d_out[i]),
      .vme_ds0_n(vme_ds0_n[i]), .vme_write_n(vme_write_n[i]), .vme_dtack_n(vme_dtack_n[i]));
    vme_master u_m (.clk, .vme_a(vme_a[i]), .vme_d_in(vme_d_in[i]), .vme_d_out(vme_d_out[i]),
      .vme_ds0_n(vme_ds0_n[i]), .vme_write_n(vme_write_n[i]), .vme_dtack_n(vme_dtack_n[i]));
  end

  always #12.5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vme(input int i, input logic [15:0] addr, input bit wr, inout logic [15:0] data);
    bit ok;
    logic [23:0] a;
    a = {3'b000, SLOT[i], addr};
    case (i)
      0: if (wr) g[0].u_m.write(a, data, ok); else g[0].u_m.read(a, data, ok);
      1: if (wr) g[1].u_m.write(a, data, ok); else g[1].u_m.read(a, data, ok);
      2: if (wr) g[2].u_m.write(a, data, ok); else g[2].u_m.read(a, data, ok);
      default: if (wr) g[3].u_m.write(a, data, ok); else g[3].u_m.read(a, data, ok);
    endcase
    checks++;
    if (!ok) failures++;
  endtask

  task automatic vme_wr(input int i, input logic [15:0] addr, input logic [15:0] data);
    logic [15:0] d;
    d = data;
    vme(i, addr, 1'b1, d);
  endtask

  task automatic vme_expect(input int i, input logic [15:0] addr, input logic [15:0] expected);
    logic [15:0] d;
    d = '0;
    vme(i, addr, 1'b0, d);
    checks++;
    if (d !== expected) begin
      failures++;
      $display("CMM %0d addr %h read %h expected %h", i, addr, d, expected);
    end
  endtask

  // stimulus and expectations per bunch crossing
  logic [2:0][24:0] rem_em [N_BC], rem_en [N_BC];
  logic [1:0][24:0] exp_cab [4][N_BC];
  logic [31:0] exp_em [N_BC], exp_en [N_BC];
  esum_t last_sys;  // system energy sums of the last crossing, held at the inputs

  task automatic run_phase(input int extra, input logic [3:0] em_crates, input int bad_bc);
    for (int k = 0; k < N_BC + 9 + extra; k++) begin
      @(posedge clk);
      #1;
      // checks
      if (k >= 4 && k - 4 < N_BC)
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (cable_out[i] !== exp_cab[i][k - 4]) begin
            failures++;
            if (failures < 20) $display("BC %0d CMM %0d cable %h exp %h", k - 4, i, cable_out[i], exp_cab[i][k - 4]);
          end
        end
      if (k >= 9 + extra) begin
        int b;
        b = k - 9 - extra;
        checks += 4;
        if (ctp[0] !== exp_em[b]) begin failures++; if (failures < 20) $display("BC %0d em %h exp %h", b, ctp[0], exp_em[b]); end
        if (ctp[3] !== exp_en[b]) begin failures++; if (failures < 20) $display("BC %0d energy %h exp %h", b, ctp[3], exp_en[b]); end
        if (ctp[1] !== '0 || ctp[2] !== '0) failures++;
      end
      // remote cables, launched 4 clocks after the crossing (+ extra delay)
      if (k >= 4 + extra && k - 4 - extra < N_BC) begin
        cable_in[0] = rem_em[k - 4 - extra];
        cable_in[3] = rem_en[k - 4 - extra];
      end
      // new crossing
      if (k < N_BC) begin
        logic [23:0] cr [4];
        esum_t e_loc, e_rem;
        bit ovf;
        bp[0] = make_hit_bp((k % 3) * 20);
        bp[1] = make_hit_bp(10);
        bp[2] = make_hit_bp(10);
        bp[3] = make_energy_bp(k % 4);
        for (int c = 0; c < 3; c++) begin
          logic [23:0] d;
          for (int t = 0; t < 8; t++) d[3*t +: 3] = 3'($urandom % 3);
          rem_em[k][c] = with_parity(d, k == bad_bc && c == 1);
        end
        e_rem.et = $urandom % (1 << (4 + 4 * (k % 4)));
        e_rem.ex = int'($urandom % (1 << (3 + 4 * (k % 4)))) - (1 << (2 + 4 * (k % 4)));
        e_rem.ey = int'($urandom % (1 << (3 + 4 * (k % 4)))) - (1 << (2 + 4 * (k % 4)));
        if (e_rem.et > 64512) e_rem.et = 64512;
        rem_en[k] = {with_parity(24'd0), energy_cables(e_rem)};
        // expected crate results
        cr[0] = ref_crate_hit(bp[0], 14);
        exp_cab[0][k] = {with_parity(24'd0), with_parity(cr[0])};
        exp_cab[1][k] = {with_parity(24'd0), with_parity(ref_crate_hit(bp[1], 14))};
        exp_cab[2][k] = {with_parity(24'd0), with_parity(ref_crate_hit(bp[2], 16))};
        e_loc = ref_crate_energy(bp[3], 16);
        exp_cab[3][k] = energy_cables(e_loc);
        // expected system results
        for (int c = 1; c < 4; c++) cr[c] = rem_em[k][c - 1][23:0];
        for (int c = 0; c < 4; c++) if (!em_crates[c]) cr[c] = '0;
        exp_em[k] = 32'(ref_sys_hit(cr, 4));
        last_sys = '{e_loc.et + e_rem.et, e_loc.ex + e_rem.ex, e_loc.ey + e_rem.ey};
        exp_en[k] = 32'(ref_energy('{e_loc.et + e_rem.et, e_loc.ex + e_rem.ex, e_loc.ey + e_rem.ey},
                                   ET_THR, ovf));
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int m = 0; m < 16; m++) bp[i][25*m +: 25] = with_parity(24'd0);
      cable_in[i] = {3{with_parity(24'd0)}};
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    // module types
    vme_expect(0, REG_ID, 16'h0014);
    vme_expect(1, REG_ID, 16'h0011);
    vme_expect(2, REG_ID, 16'h001A);
    vme_expect(3, REG_ID, 16'h001F);
    // energy system: thresholds and LUT
    for (int t = 0; t < 4; t++) vme_wr(3, REG_ET_THR + 16'(2 * t), 16'(ET_THR[t]));
    for (int a = 0; a < (1 << MET_LUT_AW); a++) vme_wr(3, 16'h8000 | 16'(2 * a), 16'(lut_entry(a)));
    for (int i = 0; i < 4; i++) vme_wr(i, REG_CABLE_ERR, 16'hFFFF);

    // phase 1: default local delay, all crates
    run_phase(0, 4'b1111, 20);
    vme_expect(0, REG_CABLE_ERR, 16'h0002);
    vme_expect(3, REG_CABLE_ERR, 16'h0000);
    vme_expect(1, REG_CABLE_ERR, 16'h0000);  // crate-level CMMs ignore their cable inputs
    vme_wr(0, REG_CABLE_ERR, 16'h0002);
    vme_expect(0, REG_CABLE_ERR, 16'h0000);

    // phase 2: 2 clocks more cable delay, local delay 5; e/gamma sums crates 0 and 2
    vme_wr(0, REG_CTRL, 16'h0505);
    vme_wr(3, REG_CTRL, 16'h0F05);
    vme_expect(0, REG_CTRL, 16'h0505);
    run_phase(2, 4'b0101, -1);
    vme_expect(0, REG_CABLE_ERR, 16'h0000);
    // the last crossing's inputs stay in place: its system sums can be read back
    vme_expect(3, REG_SYS_ET, 16'(last_sys.et));
    vme_expect(3, REG_SYS_EX, 16'(last_sys.ex));
    vme_expect(3, REG_SYS_EY, 16'(last_sys.ey));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
