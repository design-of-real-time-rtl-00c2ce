// tb_register_array: self-checking test of the register layer.
// Repeats the per-row sequence of the design: eight demultiplexer writes
// into column 1, Shift H with a random row source and random verge pixels,
// then ten Shift V pulses. The reference keeps each row in natural order and
// a rotation count, and predicts the cross window by index arithmetic; the
// window is checked after every shift. The neighbour outputs (column 1, the
// captured first row, the verge pixels of the entering row) are checked too.
module tb_register_array;
  import mv_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, shift_h = 0, shift_v = 0, capture_first = 0, capture_last = 0;
  logic [2:0] wr_addr = 0;
  pix_t wr_data = 0;
  row_src_e row_src = SRC_COL1;
  pix_t prev_row_in [UNIT], next_row_in [UNIT], col1_out [UNIT], first_out [UNIT];
  pix_t verge_top_in = 0, verge_bot_in = 0, vert_first_out, vert_last_out;
  cross_t win;
  int checks = 0, failures = 0;

  // reference state
  int ref_c1 [UNIT], ref_first [UNIT], ref_last [UNIT];
  int ref_col [3][COL_N];   // [0] = column 2, [1] = column 3, [2] = column 4
  int rot = 0;

  register_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic check_window();
    check("center",   int'(win.center),   ref_col[1][(1 + rot) % COL_N]);
    check("prev_pix", int'(win.prev_pix), ref_col[1][(0 + rot) % COL_N]);
    check("next_pix", int'(win.next_pix), ref_col[1][(2 + rot) % COL_N]);
    check("next_row", int'(win.next_row), ref_col[0][(1 + rot) % COL_N]);
    check("prev_row", int'(win.prev_row), ref_col[2][(1 + rot) % COL_N]);
  endtask

  initial begin
    foreach (ref_c1[k]) begin ref_c1[k] = 0; ref_first[k] = 0; ref_last[k] = 0; end
    foreach (ref_col[a, b]) ref_col[a][b] = 0;
    foreach (prev_row_in[k]) begin prev_row_in[k] = 0; next_row_in[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_window();
    for (int row = 0; row < 60; row++) begin
      int src, ent [UNIT];
      // demultiplexer writes, in a random order
      for (int p = 0; p < UNIT; p++) begin
        int a;
        a = (row % 2) ? p : UNIT - 1 - p;
        wr_en = 1; wr_addr = 3'(a); wr_data = pix_t'($urandom);
        ref_c1[a] = int'(wr_data);
        @(negedge clk);
      end
      wr_en = 0;
      foreach (ref_c1[k]) check("col1_out", int'(col1_out[k]), ref_c1[k]);
      // Shift H with a random source
      src = (row < 4) ? row : int'($urandom_range(0, 3));
      row_src = row_src_e'(src);
      foreach (prev_row_in[k]) begin prev_row_in[k] = pix_t'($urandom); next_row_in[k] = pix_t'($urandom); end
      verge_top_in = pix_t'($urandom); verge_bot_in = pix_t'($urandom);
      capture_first = ($urandom_range(0, 3) == 0);
      capture_last  = (row % 3 == 0);
      foreach (ent[k])
        case (src)
          0: ent[k] = ref_c1[k];
          1: ent[k] = int'(prev_row_in[k]);
          2: ent[k] = ref_last[k];
          default: ent[k] = int'(next_row_in[k]);
        endcase
      #1;
      check("vert_first_out", int'(vert_first_out), ent[0]);
      check("vert_last_out",  int'(vert_last_out),  ent[UNIT-1]);
      shift_h = 1;
      @(negedge clk);
      shift_h = 0;
      if (capture_first) ref_first = ref_c1;
      if (capture_last)  ref_last  = ref_c1;
      capture_first = 0; capture_last = 0;
      ref_col[2] = ref_col[1];
      ref_col[1] = ref_col[0];
      ref_col[0][0] = int'(verge_top_in);
      for (int k = 0; k < UNIT; k++) ref_col[0][k+1] = ent[k];
      ref_col[0][COL_N-1] = int'(verge_bot_in);
      check_window();
      foreach (ref_first[k]) check("first_out", int'(first_out[k]), ref_first[k]);
      // ten Shift V pulses
      for (int v = 0; v < COL_N; v++) begin
        shift_v = 1;
        @(negedge clk);
        shift_v = 0;
        rot = (rot + 1) % COL_N;
        check_window();
      end
      check("rotation restored", rot, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
