// tb_ref_pkg: reference model and stimulus helpers for the CMM and system
// testbenches. Everything here is written from the algorithm (sums, clipping,
// shift decoding, threshold tests), not from the RTL.
package tb_ref_pkg;
  import cmm_pkg::*;

  typedef logic [BP_LINKS-1:0] bp_t;

  // Missing-Et thresholds used to fill the LUT, and the LUT formula:
  // bit i of entry {s, mx, my} = (mx*4**s)**2 + (my*4**s)**2 > MET_THR[i]**2.
  localparam int MET_THR [8] = '{10, 25, 50, 100, 200, 400, 800, 2000};

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

  function automatic logic [24:0] with_parity(input logic [23:0] d, input bit bad = 0);
    return {(~^d) ^ bad, d};
  endfunction

  // Hit-count backplane: small multiplicities (mostly 0/1, sometimes large).
  function automatic bp_t make_hit_bp(input int busy);
    bp_t b;
    for (int m = 0; m < 16; m++) begin
      logic [23:0] d;
      for (int t = 0; t < 8; t++)
        d[3*t +: 3] = (int'($urandom % 100) < busy) ? 3'($urandom) : 3'(($urandom % 100) < 6);
      b[25*m +: 25] = with_parity(d);
    end
    return b;
  endfunction

  // Energy backplane: random 8-bit codes with a limited scale.
  function automatic bp_t make_energy_bp(input int max_scale);
    bp_t b;
    for (int m = 0; m < 16; m++) begin
      logic [23:0] d;
      for (int k = 0; k < 3; k++) d[8*k +: 8] = {2'($urandom % (max_scale + 1)), 6'($urandom)};
      b[25*m +: 25] = with_parity(d);
    end
    return b;
  endfunction

  function automatic int sat7(input int v);
    return v > 7 ? 7 : v;
  endfunction

  function automatic logic [23:0] ref_crate_hit(input bp_t b, input int n_mod);
    logic [23:0] r;
    for (int t = 0; t < 8; t++) begin
      int s = 0;
      for (int m = 0; m < n_mod; m++) s += int'(b[25*m + 3*t +: 3]);
      r[3*t +: 3] = 3'(sat7(s));
    end
    return r;
  endfunction

  function automatic int dec_u(input logic [7:0] c);
    return int'(c[5:0]) * (1 << (2 * int'(c[7:6])));
  endfunction
  function automatic int dec_s(input logic [7:0] c);
    int d = int'(c[5:0]);
    if (d >= 32) d -= 64;
    return d * (1 << (2 * int'(c[7:6])));
  endfunction

  // Value a 12-bit sum keeps after the 6+2-bit code: floor(v / 4**s) * 4**s,
  // s the smallest scale whose quotient fits 6 bits (unsigned or signed).
  function automatic int compress_u(input int v);
    int s = 0;
    while (v / (1 << (2 * s)) > 63) s++;
    return (v / (1 << (2 * s))) * (1 << (2 * s));
  endfunction
  function automatic int compress_s(input int v);
    for (int s = 0; s < 4; s++) begin
      int q;
      q = (v >= 0) ? v / (1 << (2 * s)) : -((-v + (1 << (2 * s)) - 1) / (1 << (2 * s)));
      if (q >= -32 && q <= 31) return q * (1 << (2 * s));
    end
    return 0;
  endfunction

  typedef struct { int et; int ex; int ey; } esum_t;

  function automatic esum_t ref_crate_energy(input bp_t b, input int n_mod);
    esum_t r = '{0, 0, 0};
    for (int m = 0; m < n_mod; m++) begin
      r.et += dec_u(b[25*m +: 8]);
      r.ex += dec_s(b[25*m + 8 +: 8]);
      r.ey += dec_s(b[25*m + 16 +: 8]);
    end
    return r;
  endfunction

  // Energy crate result on the two cables: {Ey, Ex, Et}, 16 bits each.
  function automatic logic [1:0][24:0] energy_cables(input esum_t e);
    logic [47:0] w;
    w = {16'(e.ey), 16'(e.ex), 16'(e.et)};
    return {with_parity(w[47:24]), with_parity(w[23:0])};
  endfunction

  function automatic logic [23:0] ref_sys_hit(input logic [23:0] c [4], input int n_crates);
    logic [23:0] r;
    for (int t = 0; t < 8; t++) begin
      int s = 0;
      for (int k = 0; k < n_crates; k++) s += int'(c[k][3*t +: 3]);
      r[3*t +: 3] = 3'(sat7(s));
    end
    return r;
  endfunction

  function automatic logic [3:0] ref_jet_et(input logic [23:0] mult, input int val [8],
                                            input int thr [4]);
    int est = 0;
    logic [3:0] h;
    for (int t = 0; t < 8; t++) est += int'(mult[3*t +: 3]) * val[t];
    for (int j = 0; j < 4; j++) h[j] = est > thr[j];
    return h;
  endfunction

  // {met_hits[7:0], et_hits[3:0]} for a system total; sets ovf on overflow.
  function automatic logic [11:0] ref_energy(input esum_t e, input int et_thr [4], output bit ovf);
    int ax, ay, s;
    logic [7:0] met;
    logic [3:0] et;
    ax = e.ex < 0 ? -e.ex : e.ex;
    ay = e.ey < 0 ? -e.ey : e.ey;
    ovf = 1;
    for (s = 0; s < 4; s++)
      if ((ax >> (2 * s)) < 64 && (ay >> (2 * s)) < 64) begin ovf = 0; break; end
    met = ovf ? 8'hFF : lut_entry((s << 12) | ((ax >> (2 * s)) << 6) | (ay >> (2 * s)));
    for (int i = 0; i < 4; i++) et[i] = e.et > et_thr[i];
    return {met, et};
  endfunction

endpackage
