// vme_slave: VME-- slave interface of a CMM.
//
// The crate backplane carries only a reduced VMEbus: A24/D16 cycles with
// SYSRESET*, A[23:1], D[15:0], DS0*, WRITE* and DTACK*. This block turns one
// such cycle into a single-clock access on a simple internal register bus.
// The strobe is synchronised with two registers; address, data and WRITE* are
// sampled when the synchronised strobe is first seen low (they are stable
// by then). A board is selected when A[23:16] equals its slot number. A write
// issues bus_wr for one clock; a read issues bus_rd and takes bus_rdata one clock
// later. DTACK* is then driven low (with the read data on vme_d_out) and
// held until DS0* goes high again; vme_d_out is zero whenever the board is not
// acknowledging a read, so the data outputs of several boards can be ORed. A
// cycle to another board is ignored until its strobe ends. The signal set is
// the design's; the slot-based address decode and this timing are this
// design's choices.
module vme_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  geo_slot,
  // VME--
  input  logic [23:1] vme_a,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  input  logic        vme_ds0_n,
  input  logic        vme_write_n,
  output logic        vme_dtack_n,
  // internal register bus
  output logic [15:1] bus_addr,
  output logic [15:0] bus_wdata,
  output logic        bus_wr,
  output logic        bus_rd,
  input  logic [15:0] bus_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_WAIT, S_ACK, S_IGNORE} state_e;
  state_e state;

  logic [1:0] ds_sync;   // ds_sync[1] high: strobe asserted
  logic       ds;
  logic       is_read;
  logic [15:0] rdata_q;

  assign ds = ds_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds_sync   <= '0;
      state     <= S_IDLE;
      bus_addr  <= '0;
      bus_wdata <= '0;
      bus_wr    <= 1'b0;
      bus_rd    <= 1'b0;
      is_read   <= 1'b0;
      rdata_q   <= '0;
    end else begin
      ds_sync <= {ds_sync[0], ~vme_ds0_n};
      bus_wr  <= 1'b0;
      bus_rd  <= 1'b0;
      unique case (state)
        S_IDLE: if (ds) begin
          if (vme_a[23:16] == {3'b000, geo_slot}) begin
            bus_addr  <= vme_a[15:1];
            bus_wdata <= vme_d_in;
            is_read   <= vme_write_n;
            if (vme_write_n) begin
              bus_rd <= 1'b1;
              state  <= S_READ;
            end else begin
              bus_wr <= 1'b1;
              state  <= S_ACK;
            end
          end else begin
            state <= S_IGNORE;
          end
        end
        S_READ: state <= S_WAIT;           // bus_rd is high during this clock
        S_WAIT: state <= S_ACK;            // bus_rdata valid now
        S_ACK: begin
          if (!ds) state <= S_IDLE;
        end
        S_IGNORE: if (!ds) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (state == S_WAIT) rdata_q <= bus_rdata;
    end
  end

  assign vme_dtack_n = !(state == S_ACK);
  assign vme_d_out   = (state == S_ACK && is_read) ? rdata_q : '0;

  // DTACK* is only driven while the strobe is asserted or just released.
  a_dtack_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    !vme_dtack_n |-> (ds || $past(ds)));
  // Only one access per strobe.
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n)
    (bus_wr || bus_rd) |=> !(bus_wr || bus_rd) [*2]);

endmodule
