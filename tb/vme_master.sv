// vme_master: behavioural VME-- bus master used by the testbenches. Its tasks
// run one A24/D16 cycle: address, data and WRITE* are set up, DS0* is driven
// low 20 ns later, the task waits for DTACK* (up to timeout_cycles clocks),
// takes the read data, releases DS0* and waits for DTACK* to go high again.
// 'ok' is 0 when no acknowledge came.
module vme_master #(
  parameter int TIMEOUT_CYCLES = 64
) (
  input  logic        clk,
  output logic [23:1] vme_a,
  output logic [15:0] vme_d_in,
  input  logic [15:0] vme_d_out,
  output logic        vme_ds0_n,
  output logic        vme_write_n,
  input  logic        vme_dtack_n
);

  int n_cycles = 0;

  initial begin
    vme_a = '0;
    vme_d_in = '0;
    vme_ds0_n = 1'b1;
    vme_write_n = 1'b1;
  end

  task automatic cycle(input logic [23:0] addr, input logic wr, input logic [15:0] wdata,
                       output logic [15:0] rdata, output bit ok);
    int t;
    vme_a = addr[23:1];
    vme_d_in = wdata;
    vme_write_n = !wr;
    #20;
    vme_ds0_n = 1'b0;
    t = 0;
    ok = 1;
    while (vme_dtack_n) begin
      @(posedge clk);
      #1;
      if (++t > TIMEOUT_CYCLES) begin ok = 0; break; end
    end
    #2;
    rdata = vme_d_out;
    vme_ds0_n = 1'b1;
    t = 0;
    while (!vme_dtack_n && t < TIMEOUT_CYCLES) begin
      @(posedge clk);
      #1;
      t++;
    end
    if (!vme_dtack_n) ok = 0;
    vme_write_n = 1'b1;
    n_cycles++;
  endtask

  task automatic write(input logic [23:0] addr, input logic [15:0] data, output bit ok);
    logic [15:0] dummy;
    cycle(addr, 1'b1, data, dummy, ok);
  endtask

  task automatic read(input logic [23:0] addr, output logic [15:0] data, output bit ok);
    cycle(addr, 1'b0, '0, data, ok);
  endtask

endmodule
