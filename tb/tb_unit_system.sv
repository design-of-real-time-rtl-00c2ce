// tb_unit_system: end-to-end test of one unit system (sensor model to ALU).
// The unit sees an 8x8 block of a random 10x10 image; the ring of pixels
// around it is supplied on the neighbour buses, as the adjacent units would:
// the row above on prev_row_in, the row below on next_row_in, and at every
// Shift H the left/right neighbours of the entering row on the verge inputs.
// Light intensities equal the 4-bit image values, which with 16 exposure
// clocks, gain 16 and a 4096 full scale digitise back to the same values.
// Checks: all 64 Laplacian results against a reference computed here, each
// pixel exactly once in row-major order, one result per five clocks within a
// row, the frame time, and the verge outputs sent to the neighbours.
module tb_unit_system;
  import mv_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, run = 0;
  logic [7:0] light [UNIT][UNIT];
  pix_t prev_row_in [UNIT], next_row_in [UNIT], row_to_next [UNIT], row_to_prev [UNIT];
  pix_t verge_top_in = 0, verge_bot_in = 0, verge_up_out, verge_dn_out;
  res_t result;
  logic [2:0] res_i, res_j;
  logic res_valid, busy, frame_done, shift_v_o, shift_h_o, adc_convert_o, alu_start_o;
  int checks = 0, failures = 0;
  int img [UNIT+2][UNIT+2];     // img[y+1][x+1] for y, x in -1..8
  int n_res, n_sh, last_res_cyc, cyc;

  unit_system dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (10000) @(posedge clk);
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

  // Row of the image that enters column 2 at Shift H number n (0..9), as an
  // index into img: n = 0 -> y = -1, n = 1..8 -> y = 0..7, n = 9 -> y = 8.
  function automatic int entering_row(input int n);
    return n;
  endfunction

  // Neighbour model: present the verges of the next entering row
  always @(negedge clk) if (rst_n) begin
    if (n_sh < 10) begin
      verge_top_in = pix_t'(img[entering_row(n_sh)][0]);
      verge_bot_in = pix_t'(img[entering_row(n_sh)][UNIT+1]);
    end
  end

  // Output checker
  always @(posedge clk) if (rst_n) begin
    if (shift_h_o && n_sh >= 1 && n_sh <= 8) begin
      check("verge_up_out", int'(verge_up_out), img[n_sh][1]);
      check("verge_dn_out", int'(verge_dn_out), img[n_sh][UNIT]);
    end
    if (shift_h_o) n_sh <= n_sh + 1;
    if (res_valid) begin
      int y, x, e;
      y = n_res / UNIT; x = n_res % UNIT;
      e = img[y][x+1] + img[y+2][x+1] + img[y+1][x] + img[y+1][x+2] - 4 * img[y+1][x+1];
      check("res_i", int'(res_i), y);
      check("res_j", int'(res_j), x);
      check("result", int'(result), e);
      if (x > 0) check("result spacing", cyc - last_res_cyc, ALU_STEPS);
      last_res_cyc = cyc;
      n_res++;
    end
  end

  initial begin
    foreach (prev_row_in[k]) begin prev_row_in[k] = 0; next_row_in[k] = 0; end
    n_res = 0; n_sh = 0; cyc = 0; last_res_cyc = 0;
    foreach (img[y, x]) img[y][x] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int t0;
      foreach (img[y, x]) img[y][x] = (f == 2) ? ((y + x) % 2) * 15 : int'($urandom_range(0, 15));
      foreach (light[y, x]) light[y][x] = 8'(img[y+1][x+1]);
      foreach (prev_row_in[k]) begin
        prev_row_in[k] = pix_t'(img[0][k+1]);
        next_row_in[k] = pix_t'(img[UNIT+1][k+1]);
      end
      n_res = 0; n_sh = 0;
      @(negedge clk);
      start = 1; t0 = cyc;
      @(negedge clk);
      start = 0;
      @(posedge frame_done);
      check("start to frame_done", cyc - t0, 3 + 16 + SLOTS * SLOT_CYC);
      check("results per frame", n_res, UNIT * UNIT);
      check("first row sent to the preceding unit", int'(row_to_prev[3]), img[1][4]);
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
