// tb_photodetector_array: self-checking test of the sensor-layer model.
// Exposes random light patterns for a random number of clocks and checks
// that, after sampling, every pixel reads back min(light * cycles, 4095) on
// the output of its half (rows 0..3 on out0, rows 4..7 on out1); that the
// held values survive a new precharge and exposure until the next sample;
// and that saturation is reached for strong light.
module tb_photodetector_array;
  import mv_pkg::*;
  logic clk = 0, precharge = 0, integrate = 0, sample = 0;
  logic [7:0] light [UNIT][UNIT];
  logic [2:0] row_sel = 0, col_sel = 0;
  logic [LEVEL_W-1:0] out0, out1;
  int checks = 0, failures = 0;
  int expv [UNIT][UNIT];

  photodetector_array #(.LIGHT_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expose(input int cycles);
    @(negedge clk); precharge = 1;
    @(negedge clk); precharge = 0; integrate = 1;
    repeat (cycles) @(negedge clk);
    integrate = 0;
  endtask

  task automatic readback();
    for (int r = 0; r < UNIT; r++)
      for (int c = 0; c < UNIT; c++) begin
        row_sel = 3'(r); col_sel = 3'(c);
        #1;
        checks++;
        if (int'(r < 4 ? out0 : out1) != expv[r][c]) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %0d,%0d got %0d exp %0d", r, c, r < 4 ? out0 : out1, expv[r][c]);
        end
      end
  endtask

  initial begin
    for (int t = 0; t < 8; t++) begin
      int cycles;
      cycles = (t == 7) ? 40 : int'($urandom_range(1, 30));
      foreach (light[r, c]) begin
        light[r][c] = (t == 7) ? 8'd255 : 8'($urandom);
        expv[r][c] = int'(light[r][c]) * cycles;
        if (expv[r][c] > 4095) expv[r][c] = 4095;
      end
      expose(cycles);
      sample = 1; @(negedge clk); sample = 0;
      readback();
      // a new exposure must not disturb the held values
      foreach (light[r, c]) light[r][c] = 8'($urandom);
      expose(3);
      readback();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
