// tb_cmm_config: checks the geographical-address decode against a table of
// the eight CMM module types, and that non-CMM slots and crates are invalid.
module tb_cmm_config;
  import cmm_pkg::*;

  logic [3:0] geo_crate;
  logic [4:0] geo_slot;
  cmm_cfg_t   cfg;
  int checks = 0, failures = 0;

  cmm_config dut (.geo_crate, .geo_slot, .cfg);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cfg(input int crate, input int slot, input logic v,
                            input cmm_func_e f, input logic sys);
    geo_crate = 4'(crate);
    geo_slot  = 5'(slot);
    #1;
    checks++;
    if (cfg.valid !== v || (v && (cfg.func !== f || cfg.is_system !== sys))) begin
      failures++;
      $display("crate %0d slot %0d: got %p", crate, slot, cfg);
    end
  endtask

  initial begin
    // Table of module types
    expect_cfg(0, 3,  1, FUNC_EM,     1);  // e/gamma system
    expect_cfg(0, 20, 1, FUNC_TAU,    1);  // tau/hadron system
    for (int c = 1; c < 4; c++) begin
      expect_cfg(c, 3,  1, FUNC_EM,   0);  // e/gamma crate
      expect_cfg(c, 20, 1, FUNC_TAU,  0);  // tau/hadron crate
    end
    expect_cfg(4, 3,  1, FUNC_JET,    1);  // jet system
    expect_cfg(4, 20, 1, FUNC_ENERGY, 1);  // energy system
    expect_cfg(5, 3,  1, FUNC_JET,    0);  // jet crate
    expect_cfg(5, 20, 1, FUNC_ENERGY, 0);  // energy crate
    // not CMM positions
    for (int s = 0; s < 32; s++)
      if (s != 3 && s != 20) expect_cfg(2, s, 0, FUNC_EM, 0);
    for (int c = 6; c < 16; c++) expect_cfg(c, 3, 0, FUNC_EM, 0);
    // module counts
    geo_crate = 4'd1; geo_slot = 5'd3; #1;
    checks++; if (cfg.is_jep !== 1'b0) failures++;
    geo_crate = 4'd5; #1;
    checks++; if (cfg.is_jep !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
