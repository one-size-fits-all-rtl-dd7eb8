// tb_system_energy_merge: loads the missing-Et LUT with
//   bit i of entry {s, mx, my} = ((mx*4**s)**2 + (my*4**s)**2 > MET_THR[i]**2),
// reads part of it back, then drives random crate sums of several sizes and
// checks the system sums, the four total-Et hits and the eight missing-Et hits
// (all ones on overflow) two clocks later, at one result per clock.
module tb_system_energy_merge;
  import cmm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  crate_sums_t local_sums, remote_sums;
  logic [1:0] crate_en;
  logic [3:0][15:0] et_thr;
  logic lut_we;
  logic [13:0] lut_addr;
  logic [7:0] lut_wdata, lut_rdata;
  logic [3:0] et_hits;
  logic [7:0] met_hits;
  logic met_overflow;
  logic [16:0] sys_et;
  logic signed [16:0] sys_ex, sys_ey;
  int checks = 0, failures = 0, n_ovf = 0, n_met = 0, n_et = 0;

  localparam int MET_THR [8] = '{10, 25, 50, 100, 200, 400, 800, 2000};

  system_energy_merge dut (.clk, .rst_n, .local_sums, .remote_sums, .crate_en, .et_thr,
    .lut_we, .lut_addr, .lut_wdata, .lut_rdata, .et_hits, .met_hits, .met_overflow,
    .sys_et, .sys_ex, .sys_ey);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] lut_entry(input int a);
    longint s, mx, my, m2;
    logic [7:0] r;
    s  = (a >> 12) & 3;
    mx = ((a >> 6) & 63) << (2 * s);
    my = (a & 63) << (2 * s);
    m2 = mx * mx + my * my;
    for (int i = 0; i < 8; i++) r[i] = (m2 > longint'(MET_THR[i]) * MET_THR[i]);
    return r;
  endfunction

  typedef struct { int et; int ex; int ey; bit use_l; bit use_r; } stim_t;
  stim_t q [$];

  task automatic check_result(input stim_t st);
    int et, ex, ey, ax, ay, s;
    logic [7:0] exp_met;
    bit ovf;
    et = st.et; ex = st.ex; ey = st.ey;
    ax = ex < 0 ? -ex : ex;
    ay = ey < 0 ? -ey : ey;
    ovf = 1;
    for (s = 0; s < 4; s++)
      if ((ax >> (2 * s)) < 64 && (ay >> (2 * s)) < 64) begin ovf = 0; break; end
    exp_met = ovf ? 8'hFF : lut_entry((s << 12) | ((ax >> (2 * s)) << 6) | (ay >> (2 * s)));
    checks += 3;
    if (met_hits !== exp_met) begin
      failures++;
      if (failures < 10) $display("met: ex %0d ey %0d got %b exp %b", ex, ey, met_hits, exp_met);
    end
    for (int i = 0; i < 4; i++)
      if (et_hits[i] !== (et > int'(et_thr[i]))) begin
        failures++;
        if (failures < 10) $display("et %0d thr %0d: got %b", et, et_thr[i], et_hits[i]);
      end
    if (met_overflow !== ovf) failures++;
    if (ovf) n_ovf++;
    if (!ovf && exp_met != 0 && exp_met != 8'hFF) n_met++;
    if (et_hits != 0 && et_hits != 4'hF) n_et++;
  endtask

  initial begin
    local_sums = '0; remote_sums = '0; crate_en = 2'b11;
    et_thr = {16'd40000, 16'd5000, 16'd800, 16'd100};
    lut_we = 0; lut_addr = '0; lut_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // load LUT
    for (int a = 0; a < (1 << 14); a++) begin
      @(negedge clk);
      lut_we = 1; lut_addr = 14'(a); lut_wdata = lut_entry(a);
    end
    @(negedge clk);
    lut_we = 0;
    // read back a sample
    for (int a = 0; a < (1 << 14); a += 37) begin
      @(negedge clk);
      lut_addr = 14'(a);
      @(negedge clk);
      checks++;
      if (lut_rdata !== lut_entry(a)) failures++;
    end
    // trigger path: one new input per clock, check two clocks later
    for (int it = 0; it < 3000; it++) begin
      stim_t st;
      int range;
      @(negedge clk);
      if (q.size() == 2) begin
        check_result(q.pop_front());
        checks++;
        if (int'(sys_et) != q[0].et || int'(sys_ex) != q[0].ex || int'(sys_ey) != q[0].ey) failures++;
      end
      range = (it % 3 == 0) ? 64 : (it % 3 == 1) ? 1024 : 32768;
      local_sums.et  = 16'($urandom % (range * 2));
      local_sums.ex  = 16'(int'($urandom % range) - range / 2);
      local_sums.ey  = 16'(int'($urandom % range) - range / 2);
      remote_sums.et = 16'($urandom % (range * 2));
      remote_sums.ex = 16'(int'($urandom % range) - range / 2);
      remote_sums.ey = 16'(int'($urandom % range) - range / 2);
      crate_en = (it % 5 == 0) ? 2'($urandom) : 2'b11;
      st.use_l = crate_en[0];
      st.use_r = crate_en[1];
      st.et = (st.use_l ? int'(local_sums.et) : 0) + (st.use_r ? int'(remote_sums.et) : 0);
      st.ex = (st.use_l ? int'(local_sums.ex) : 0) + (st.use_r ? int'(remote_sums.ex) : 0);
      st.ey = (st.use_l ? int'(local_sums.ey) : 0) + (st.use_r ? int'(remote_sums.ey) : 0);
      q.push_back(st);
    end
    checks++;
    if (n_ovf == 0 || n_met == 0 || n_et == 0) failures++;
    $display("overflow %0d, partial met %0d, partial et %0d", n_ovf, n_met, n_et);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
