// tb_sense_amplifier: self-checking test of the amplifier model: the output
// equals min(GAIN * in, 4095) for all 4096 input codes, at the default gain
// of 16 and at a gain of 3.
module tb_sense_amplifier;
  import mv_pkg::*;
  logic [LEVEL_W-1:0] in, out16, out3;
  int checks = 0, failures = 0;

  sense_amplifier                dut16 (.in, .out(out16));
  sense_amplifier #(.GAIN(3))    dut3  (.in, .out(out3));

  initial begin
    for (int v = 0; v < 4096; v++) begin
      int e16, e3;
      in = LEVEL_W'(v);
      #1;
      e16 = (v * 16 > 4095) ? 4095 : v * 16;
      e3  = (v * 3  > 4095) ? 4095 : v * 3;
      checks += 2;
      if (int'(out16) != e16) begin failures++; if (failures < 10) $display("FAIL g16 %0d -> %0d", v, out16); end
      if (int'(out3)  != e3)  begin failures++; if (failures < 10) $display("FAIL g3 %0d -> %0d", v, out3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
