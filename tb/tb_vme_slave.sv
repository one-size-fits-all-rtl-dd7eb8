// tb_vme_slave: a VME-- master runs random write and read cycles to the
// slave's slot and to other slots. The testbench models the register bus as a
// 64-word memory answering one clock after bus_rd. Checks: every write to the
// slot gives exactly one bus_wr with its address and data, every read returns
// the stored word, DTACK* comes for the slot's cycles only, and cycles to other
// slots cause no bus access.
module tb_vme_slave;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [23:1] vme_a;
  logic [15:0] vme_d_in, vme_d_out;
  logic vme_ds0_n, vme_write_n, vme_dtack_n;
  logic [15:1] bus_addr;
  logic [15:0] bus_wdata, bus_rdata;
  logic bus_wr, bus_rd;
  logic [15:0] mem [64];
  logic [15:0] model [64];
  int n_wr = 0, n_rd = 0;
  int checks = 0, failures = 0;

  vme_slave dut (.clk, .rst_n, .geo_slot(5'd7), .vme_a, .vme_d_in, .vme_d_out, .vme_ds0_n,
                 .vme_write_n, .vme_dtack_n, .bus_addr, .bus_wdata, .bus_wr, .bus_rd, .bus_rdata);
  vme_master u_master (.clk, .vme_a, .vme_d_in, .vme_d_out, .vme_ds0_n, .vme_write_n, .vme_dtack_n);

  always #12.5 clk = ~clk;  // 40 MHz

  always_ff @(posedge clk) begin
    if (!rst_n) for (int i = 0; i < 64; i++) mem[i] <= '0;
    else if (bus_wr) begin mem[bus_addr[6:1]] <= bus_wdata; n_wr++; end
    if (bus_rd) begin bus_rdata <= mem[bus_addr[6:1]]; n_rd++; end
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    logic [15:0] d;
    for (int i = 0; i < 64; i++) model[i] = '0;
    bus_rdata = '0;
    #100 rst_n = 1'b1;
    #100;
    for (int it = 0; it < 400; it++) begin
      int w, nw0, nr0;
      bit mine, wr;
      logic [23:0] addr;
      w = $urandom % 64;
      mine = ($urandom % 5) != 0;
      wr = $urandom % 2;
      addr = {mine ? 8'd7 : 8'(1 + $urandom % 6), 9'd0, 6'(w), 1'b0};
      nw0 = n_wr; nr0 = n_rd;
      if (wr) begin
        d = 16'($urandom);
        u_master.write(addr, d, ok);
        if (mine) model[w] = d;
      end else begin
        u_master.read(addr, d, ok);
      end
      checks++;
      if (ok !== mine) begin
        failures++;
        $display("it %0d: ack %b for mine=%b", it, ok, mine);
      end
      checks++;
      if ((n_wr - nw0) != (mine && wr) || (n_rd - nr0) != (mine && !wr)) begin
        failures++;
        $display("it %0d: %0d writes %0d reads", it, n_wr - nw0, n_rd - nr0);
      end
      if (mine && !wr) begin
        checks++;
        if (d !== model[w]) begin
          failures++;
          $display("it %0d: read %h expected %h", it, d, model[w]);
        end
      end
      #50;
    end
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (mem[i] !== model[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
