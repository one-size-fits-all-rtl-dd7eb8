// jem_energy_encoder: compresses one 12-bit JEM energy sum into the 8-bit code
// carried on the backplane to the energy CMM.
//
// The code is {scale[1:0], data[5:0]} and stands for data * 4**scale, i.e. the
// data field shifted left by 0, 2, 4 or 6 bits. The encoder picks the smallest
// scale whose shifted value still fits in the 6-bit field, so small sums keep
// full precision and large ones lose their low bits. The 6-bit/2-bit split and
// the x1/x4/x16/x64 scales follow the design; truncating the dropped bits
// (rather than rounding) and, for the signed Ex/Ey components (SIGNED=1), a
// 6-bit two's complement data field with an arithmetic shift are this design's
// choices. Purely combinational.
module jem_energy_encoder #(
  parameter bit SIGNED = 1'b0  // 0: Et (unsigned), 1: Ex or Ey (two's complement)
) (
  input  logic [11:0] value,
  output logic [7:0]  code
);

  always_comb begin
    logic signed [12:0] v;
    logic signed [12:0] sh;
    logic found;
    v = SIGNED ? 13'(signed'(value)) : 13'(value);
    code = '0;
    found = 1'b0;
    for (int s = 0; s < 4; s++) begin
      sh = v >>> (2 * s);
      if (!found) begin
        if (SIGNED ? (sh >= -13'sd32 && sh <= 13'sd31) : (sh <= 13'sd63)) begin
          code = {2'(s), sh[5:0]};
          found = 1'b1;
        end
      end
    end
  end

endmodule
