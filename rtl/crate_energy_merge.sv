// crate_energy_merge: Crate Merging Logic of the energy CMM.
//
// Each of up to 16 JEMs sends its Et, Ex and Ey sums as three 8-bit codes
// (6 data bits, 2 scale bits meaning x1, x4, x16 or x64). The codes are
// expanded by bit shifting, which keeps the latency low, and added over all
// modules enabled in mod_en. Et is unsigned (at most 16 x 4032 = 64512) and Ex,
// Ey are two's complement (16 x -2048 .. 16 x 1984), so each crate sum fits in
// 16 bits and the three together make the 48-bit crate result. One registered
// stage. mod_data[m] is {Ey code, Ex code, Et code}, Et in the low byte (this
// design's packing).
module crate_energy_merge
  import cmm_pkg::*;
#(
  parameter int unsigned N_MOD = N_MOD_MAX
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_MOD-1:0][2:0][7:0]  mod_data,
  input  logic [N_MOD-1:0]            mod_en,
  output crate_sums_t                 sums
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sums <= '0;
    end else begin
      logic        [SUM_W-1:0] et;
      logic signed [SUM_W-1:0] ex, ey;
      et = '0;
      ex = '0;
      ey = '0;
      for (int m = 0; m < N_MOD; m++) begin
        if (mod_en[m]) begin
          et += SUM_W'(decode_et(mod_data[m][0]));
          ex += SUM_W'(decode_exy(mod_data[m][1]));
          ey += SUM_W'(decode_exy(mod_data[m][2]));
        end
      end
      sums.et <= et;
      sums.ex <= ex;
      sums.ey <= ey;
    end
  end

endmodule
