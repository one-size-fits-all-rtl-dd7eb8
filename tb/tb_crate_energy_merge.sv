// tb_crate_energy_merge: random 8-bit Et/Ex/Ey codes from 16 JEMs, decoded in
// the testbench as data * 4**scale (data signed for Ex/Ey) and summed; the
// crate sums must appear one clock later. Includes the extreme codes.
module tb_crate_energy_merge;
  import cmm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0][2:0][7:0] mod_data;
  logic [15:0] mod_en;
  crate_sums_t sums;
  int checks = 0, failures = 0;

  crate_energy_merge dut (.clk, .rst_n, .mod_data, .mod_en, .sums);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_u(input logic [7:0] c);
    return int'(c[5:0]) * (1 << (2 * int'(c[7:6])));
  endfunction
  function automatic int ref_s(input logic [7:0] c);
    int d;
    d = int'(c[5:0]);
    if (d >= 32) d -= 64;
    return d * (1 << (2 * int'(c[7:6])));
  endfunction

  initial begin
    mod_data = '0;
    mod_en = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 1000; it++) begin
      int et, ex, ey;
      @(negedge clk);
      mod_en = (it % 4 == 0) ? 16'($urandom) : 16'hFFFF;
      for (int m = 0; m < 16; m++)
        for (int k = 0; k < 3; k++) begin
          case (it)
            0: mod_data[m][k] = (k == 0) ? 8'hFF : 8'hDF;  // max Et, max positive Ex/Ey
            1: mod_data[m][k] = (k == 0) ? 8'h00 : 8'hE0;  // most negative Ex/Ey
            default: mod_data[m][k] = 8'($urandom);
          endcase
        end
      et = 0; ex = 0; ey = 0;
      for (int m = 0; m < 16; m++)
        if (mod_en[m]) begin
          et += ref_u(mod_data[m][0]);
          ex += ref_s(mod_data[m][1]);
          ey += ref_s(mod_data[m][2]);
        end
      @(posedge clk);
      #1;
      checks += 3;
      if (int'(sums.et) != et || int'(sums.ex) != ex || int'(sums.ey) != ey) begin
        failures++;
        if (failures < 10) $display("it %0d: got %0d %0d %0d exp %0d %0d %0d", it,
                                    sums.et, sums.ex, sums.ey, et, ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
