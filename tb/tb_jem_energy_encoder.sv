// tb_jem_energy_encoder: exhaustive check of the 12-bit to 8-bit JEM energy
// compression, for the unsigned (Et) and signed (Ex/Ey) versions.
// Reference: the smallest scale s in 0..3 for which value / 4**s (floor) fits
// the 6-bit field; the code's decoded value must equal that floor times 4**s.
module tb_jem_energy_encoder;
  import cmm_pkg::*;

  logic [11:0] value;
  logic [7:0]  code_u, code_s;
  int checks = 0, failures = 0;

  jem_energy_encoder #(.SIGNED(1'b0)) dut_u (.value, .code(code_u));
  jem_energy_encoder #(.SIGNED(1'b1)) dut_s (.value, .code(code_s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      int s_exp, d_exp, sv, ss_exp, sd_exp;
      value = 12'(v);
      #1;
      // unsigned reference
      s_exp = 0;
      while ((v / (1 << (2 * s_exp))) > 63) s_exp++;
      d_exp = v / (1 << (2 * s_exp));
      checks++;
      if (code_u !== {2'(s_exp), 6'(d_exp)}) begin
        failures++;
        if (failures < 10) $display("Et %0d: code %h expected s=%0d d=%0d", v, code_u, s_exp, d_exp);
      end
      // signed reference (floor division)
      sv = (v >= 2048) ? v - 4096 : v;
      ss_exp = 0;
      forever begin
        int q;
        q = (sv >= 0) ? sv / (1 << (2 * ss_exp)) : -((-sv + (1 << (2 * ss_exp)) - 1) / (1 << (2 * ss_exp)));
        if (q >= -32 && q <= 31) begin
          sd_exp = q;
          break;
        end
        ss_exp++;
      end
      checks++;
      if (code_s !== {2'(ss_exp), 6'(sd_exp)}) begin
        failures++;
        if (failures < 10) $display("Ex %0d: code %h expected s=%0d d=%0d", sv, code_s, ss_exp, sd_exp);
      end
      // decode round trip stays within one step of the scale
      checks++;
      if (32'(decode_et(code_u)) > v || v - 32'(decode_et(code_u)) >= (1 << (2 * s_exp))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
