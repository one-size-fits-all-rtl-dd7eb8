// cmm_pkg: types and constants shared by the Common Merger Module (CMM) logic.
//
// The CMM is the one merger board used by both the Cluster Processor (CP) and
// the Jet/Energy-sum Processor (JEP). Every CMM sees the same backplane and
// cable widths; what it computes is set by its module type (function and
// level), which in turn follows from its geographical address.
//
// Widths taken from the design: 400 backplane links (16 modules x 25), 8
// threshold sets of 3-bit multiplicities (saturating at 7), 50 bits of local
// crate result, 75 bits (3 x 25) of remote cable input, 8-bit JEM energy codes
// (6 data bits + 2 scale bits, x1/x4/x16/x64), 4 total-Et and 8 missing-Et
// thresholds. Choices of this design: the 25th bit of each backplane word and
// of each cable is an odd-parity bit over the other 24; the CTP word is 32 bits;
// the VME-- register map below.
package cmm_pkg;

  localparam int unsigned N_MOD_MAX   = 16;  // JEMs per JEP crate (14 CPMs per CP crate)
  localparam int unsigned N_MOD_CP    = 14;
  localparam int unsigned MOD_W       = 25;  // backplane links per source module
  localparam int unsigned MOD_DATA_W  = 24;  // payload bits per source module
  localparam int unsigned BP_LINKS    = N_MOD_MAX * MOD_W;  // 400
  localparam int unsigned N_THR       = 8;   // threshold sets per CMM
  localparam int unsigned MULT_W      = 3;   // multiplicity width, saturates at 7
  localparam int unsigned MULT_MAX    = 7;
  localparam int unsigned HIT_W       = N_THR * MULT_W;  // 24
  localparam int unsigned CABLE_W     = 25;  // one parallel LVDS cable
  localparam int unsigned CABLE_DATA_W = 24;
  localparam int unsigned N_CABLES_IN = 3;   // 75 bits from remote CMMs
  localparam int unsigned N_CABLES_OUT = 2;  // 50 bits of crate result
  localparam int unsigned LOCAL_W     = 50;
  localparam int unsigned SUM_W       = 16;  // crate Et (unsigned), Ex, Ey (signed)
  localparam int unsigned SYS_SUM_W   = 17;  // system-level sums of two crates
  localparam int unsigned N_ET_THR    = 4;
  localparam int unsigned N_MET_THR   = 8;
  localparam int unsigned N_JET_ET_THR = 4;
  localparam int unsigned MET_LUT_AW  = 14;  // {scale[1:0], |Ex|[5:0], |Ey|[5:0]}
  localparam int unsigned CTP_W       = 32;

  // Function loaded into a CMM (Table of module types: four functions, each at
  // crate or system level).
  typedef enum logic [1:0] {
    FUNC_EM     = 2'd0,  // CP e/gamma hit counting
    FUNC_TAU    = 2'd1,  // CP tau/hadron hit counting
    FUNC_JET    = 2'd2,  // JEP jet hit counting
    FUNC_ENERGY = 2'd3   // JEP Et, Ex, Ey summing
  } cmm_func_e;

  typedef struct packed {
    logic      valid;      // address is a CMM position
    cmm_func_e func;
    logic      is_system;  // system-level CMM: drives the CTP
    logic      is_jep;     // JEP crate (16 modules) rather than CP (14)
  } cmm_cfg_t;

  // Crate energy result, 48 bits, sent over the two output cables.
  typedef struct packed {
    logic signed [SUM_W-1:0] ey;
    logic signed [SUM_W-1:0] ex;
    logic        [SUM_W-1:0] et;
  } crate_sums_t;

  // Energy sums of one JEM before compression (12 bits each; Ex, Ey signed).
  typedef struct packed {
    logic [11:0] ey;
    logic [11:0] ex;
    logic [11:0] et;
  } jem_sums_t;

  // VME-- register map (16-bit word registers, byte address = A[15:0]).
  localparam logic [15:0] REG_ID        = 16'h0000;  // R:  {valid,is_jep,is_system,func}
  localparam logic [15:0] REG_CTRL      = 16'h0002;  // RW: [3:0] local delay, [11:8] crate enable
  localparam logic [15:0] REG_PHASE     = 16'h0004;  // RW: backplane capture edge per module
  localparam logic [15:0] REG_BP_ERR    = 16'h0006;  // R, write 1 to clear: backplane parity errors
  localparam logic [15:0] REG_CABLE_ERR = 16'h0008;  // R, write 1 to clear: cable parity errors
  localparam logic [15:0] REG_MOD_EN    = 16'h000A;  // RW: source modules used in the crate sum
  localparam logic [15:0] REG_STATUS    = 16'h000C;  // R:  [0] crate sum clipped, [1] system sum clipped, [2] missing-Et overflow
  localparam logic [15:0] REG_JET_EST   = 16'h000E;  // R:  jet-Et estimate
  localparam logic [15:0] REG_SYS_ET    = 16'h0040;  // R:  system total Et [15:0]
  localparam logic [15:0] REG_SYS_EX    = 16'h0042;  // R:  system Ex [15:0]
  localparam logic [15:0] REG_SYS_EY    = 16'h0044;  // R:  system Ey [15:0]
  localparam logic [15:0] REG_ET_THR    = 16'h0010;  // RW x4: total-Et thresholds
  localparam logic [15:0] REG_JET_VAL   = 16'h0020;  // RW x8: jet threshold values [7:0]
  localparam logic [15:0] REG_JET_ET_THR = 16'h0030; // RW x4: jet-Et thresholds
  // 0x8000-0xFFFE: missing-Et LUT, word address A[14:1] = LUT address, data [7:0]

  // Odd parity bit that makes a cable or backplane word have an odd number of ones.
  function automatic logic odd_parity(input logic [CABLE_DATA_W-1:0] d);
    return ~^d;
  endfunction

  // 8-bit JEM energy code {scale[1:0], data[5:0]} -> value = data << (2*scale).
  function automatic logic [11:0] decode_et(input logic [7:0] code);
    return 12'(code[5:0]) << (2 * code[7:6]);
  endfunction

  // Same code for a signed component: data is a 6-bit two's complement number.
  function automatic logic signed [12:0] decode_exy(input logic [7:0] code);
    logic signed [12:0] m;
    m = 13'(signed'(code[5:0]));
    return m <<< (2 * code[7:6]);
  endfunction

endpackage
