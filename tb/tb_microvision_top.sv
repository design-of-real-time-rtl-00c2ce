// tb_microvision_top: end-to-end test of the 2x2-unit microvision at its
// default parameters (16x16 pixels). Three single frames are exposed and
// processed (each started by `start`): a random image, a ring of bright
// squares on a dark background with a bright top row and a grey bottom row,
// and a checkerboard. Then three random frames run back to back with `run`
// held high. Every one of the
// 256 Laplacian results is compared with a reference computed here with zero
// outside the image, and each pixel must be reported exactly once per frame.
// The frame time (start to frame_done) is checked.
// Mechanisms counted, each of which must occur: Shift V, Shift H, pipeline
// overlap (a conversion and an ALU start in the same cycle), results that
// depend on a row from the unit above/below (4x16 bus), results that depend
// on a verge pixel from the unit left/right (4x2 bus), results at the image
// border, both positive and negative results, and frames run back to back
// with `run` held high (the next image exposed during the current readout;
// the frame period of 474 cycles is checked).
module tb_microvision_top;
  import mv_pkg::*;
  localparam int H = 16, W = 16;
  logic clk = 0, rst_n = 0, start = 0, run = 0;
  logic [7:0] light [H][W];
  res_t       res       [2][2];
  logic [3:0] res_y     [2][2];
  logic [3:0] res_x     [2][2];
  logic       res_valid [2][2];
  logic busy, frame_done, shift_v_act, shift_h_act, adc_convert_act, alu_start_act;
  int checks = 0, failures = 0;
  int img [H][W];
  int seen [H][W];
  int cyc = 0;
  int n_shift_v = 0, n_shift_h = 0, n_overlap = 0, n_row_bus = 0, n_verge_bus = 0;
  int n_border = 0, n_pos = 0, n_neg = 0, n_cont = 0;

  microvision_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (9000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int px(input int y, input int x);
    if (y < 0 || y >= H || x < 0 || x >= W) return 0;
    return img[y][x];
  endfunction

  always @(posedge clk) if (rst_n) begin
    n_shift_v += int'(shift_v_act);
    n_shift_h += int'(shift_h_act);
    n_overlap += int'(adc_convert_act && alu_start_act);
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++)
        if (res_valid[r][c]) begin
          int y, x, e;
          y = int'(res_y[r][c]); x = int'(res_x[r][c]);
          e = px(y, x-1) + px(y-1, x) + px(y+1, x) + px(y, x+1) - 4 * px(y, x);
          checks++;
          if (y / UNIT != r || x / UNIT != c || int'(res[r][c]) != e) begin
            failures++;
            if (failures < 20) $display("FAIL unit %0d,%0d pixel %0d,%0d got %0d exp %0d", r, c, y, x, res[r][c], e);
          end
          if (y / UNIT == r && x / UNIT == c) seen[y][x]++;
          if ((y % UNIT == 0 && y > 0 && px(y-1, x) != 0) ||
              (y % UNIT == UNIT-1 && y < H-1 && px(y+1, x) != 0)) n_row_bus++;
          if ((x % UNIT == 0 && x > 0 && px(y, x-1) != 0) ||
              (x % UNIT == UNIT-1 && x < W-1 && px(y, x+1) != 0)) n_verge_bus++;
          if (y == 0 || x == 0 || y == H-1 || x == W-1) n_border++;
          if (e > 0) n_pos++;
          if (e < 0) n_neg++;
        end
  end

  // Test images: 0 random, 1 ring of bright squares with a bright top row and
  // a grey bottom row, 2 checkerboard, 3 and above random.
  task automatic make_image(input int kind, output int im [H][W]);
    foreach (im[y, x]) begin
      int dy, dx, d2;
      dy = 2 * y - 15; dx = 2 * x - 15; d2 = dy * dy + dx * dx;
      case (kind)
        1: im[y][x] = (y == 0) ? 15 : (y == H-1) ? 8 :
                      (d2 >= 120 && d2 <= 200 && ((y + x) % 3 != 0)) ? 15 : 0;
        2: im[y][x] = ((y + x) % 2) * 15;
        default: im[y][x] = int'($urandom_range(0, 15));
      endcase
    end
  endtask

  task automatic check_seen();
    foreach (seen[y, x]) begin
      checks++;
      if (seen[y][x] != 1) begin
        failures++;
        if (failures < 20) $display("FAIL pixel %0d,%0d reported %0d times", y, x, seen[y][x]);
      end
      seen[y][x] = 0;
    end
  endtask

  task automatic count(input string what, input int n);
    checks++;
    $display("%s: %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int t0;
      make_image(f, img);
      foreach (img[y, x]) begin
        light[y][x] = 8'(img[y][x]);
        seen[y][x] = 0;
      end
      @(negedge clk);
      start = 1; t0 = cyc;
      @(negedge clk);
      start = 0;
      @(posedge frame_done);
      checks++;
      if (cyc - t0 != 3 + 16 + SLOTS * SLOT_CYC) begin
        failures++;
        $display("FAIL frame time %0d", cyc - t0);
      end
      check_seen();
      $display("frame %0d: %0d cycles from start to frame_done", f, cyc - t0);
      repeat (3) @(negedge clk);
    end
    // Continuous mode: three frames back to back; each next image is put on
    // the light input while the current frame is read out, and is exposed
    // at the end of that readout.
    begin
      int nxt [H][W];
      int t_last;
      make_image(3, img);
      foreach (img[y, x]) light[y][x] = 8'(img[y][x]);
      @(negedge clk);
      run = 1;
      repeat (40) @(negedge clk);                 // first exposure is over
      make_image(4, nxt);
      foreach (nxt[y, x]) light[y][x] = 8'(nxt[y][x]);
      for (int k = 0; k < 3; k++) begin
        @(posedge frame_done);
        check_seen();
        if (k > 0) begin
          checks++;
          if (cyc - t_last != 1 + SLOTS * SLOT_CYC) begin
            failures++;
            $display("FAIL continuous frame period %0d", cyc - t_last);
          end
          $display("continuous frame %0d: period %0d cycles", k, cyc - t_last);
        end
        t_last = cyc;
        n_cont++;
        @(negedge clk);
        img = nxt;                                 // results of the next frame
        if (k == 0) begin
          make_image(5, nxt);
          foreach (nxt[y, x]) light[y][x] = 8'(nxt[y][x]);
        end
        if (k == 1) run = 0;                       // the third frame is the last
      end
      repeat (3) @(negedge clk);
      checks++;
      if (busy) begin
        failures++;
        $display("FAIL still busy after run dropped");
      end
    end
    count("Shift V pulses (unit 0,0)", n_shift_v);
    count("Shift H pulses (unit 0,0)", n_shift_h);
    count("conversion/ALU overlap cycles (unit 0,0)", n_overlap);
    count("results using a row from another unit", n_row_bus);
    count("results using a verge pixel from another unit", n_verge_bus);
    count("results at the image border", n_border);
    count("positive results", n_pos);
    count("negative results", n_neg);
    count("frames in continuous mode", n_cont);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
