// tb_flash_adc: self-checking test of the flash ADC model. For random
// levels on both inputs and a random input select it checks that the code
// registered on `convert` equals floor(level * 16 / 4096) of the selected
// input, that it appears one cycle after `convert` with `dvalid`, that it is
// held without `convert`, and the codes at every comparator threshold.
module tb_flash_adc;
  import mv_pkg::*;
  logic clk = 0, rst_n = 0, convert = 0, sel = 0, dvalid;
  logic [LEVEL_W-1:0] vin0 = 0, vin1 = 0;
  pix_t dout;
  int checks = 0, failures = 0;

  flash_adc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic conv_one(input int v0, input int v1, input bit s);
    int e;
    @(negedge clk);
    vin0 = LEVEL_W'(v0); vin1 = LEVEL_W'(v1); sel = s; convert = 1;
    e = (s ? v1 : v0) / 256;
    @(negedge clk);
    convert = 0;
    check("dvalid", int'(dvalid), 1);
    check("code", int'(dout), e);
    vin0 = LEVEL_W'($urandom); vin1 = LEVEL_W'($urandom);
    @(negedge clk);
    check("dvalid low", int'(dvalid), 0);
    check("code held", int'(dout), e);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 16; k++) begin
      conv_one(k * 256, 4095 - k * 256, 1'b0);
      if (k > 0) conv_one(0, k * 256 - 1, 1'b1);
    end
    for (int n = 0; n < 2000; n++)
      conv_one(int'($urandom_range(0, 4095)), int'($urandom_range(0, 4095)), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
