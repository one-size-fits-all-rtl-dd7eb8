// pipeline_delay: programmable delay of the local crate result on a
// system-level CMM.
//
// The local Crate Merging Logic reaches the System Merging Logic on board,
// while the other crates' results come over cables and through the cable
// receivers; this delay line holds the local word back by 'delay' cycles
// (0..MAX_DELAY) so that all inputs of a system sum belong to the same bunch
// crossing. delay = 0 passes din straight through; delay = d gives din from d
// rising edges earlier. The delay line follows the design; its depth is this
// design's choice.
module pipeline_delay #(
  parameter int unsigned W         = 50,
  parameter int unsigned MAX_DELAY = 15
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [W-1:0]                   din,
  input  logic [$clog2(MAX_DELAY+1)-1:0] delay,
  output logic [W-1:0]                   dout
);

  logic [MAX_DELAY:1][W-1:0] stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '0;
    end else begin
      stage[1] <= din;
      for (int i = 2; i <= MAX_DELAY; i++) stage[i] <= stage[i-1];
    end
  end

  always_comb begin
    if (delay == 0)                       dout = din;
    else if (32'(delay) >= MAX_DELAY)     dout = stage[MAX_DELAY];
    else                                  dout = stage[delay];
  end

endmodule
