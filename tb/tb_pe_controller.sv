// tb_pe_controller: self-checking test of the unit sequencer.
// Runs three frames and checks, per frame: the frame length from start to
// frame_done (busy for 2 + EXPOSURE + SLOTS*SLOT_CYC cycles, frame_done in
// the cycle after), the number of each
// strobe (precharge, integrate, sample, 64 conversions and demultiplexer
// writes, 110 Shift V, 10 Shift H, 64 ALU starts), the order of the sensor
// rows converted (8, then 1..7) and the amplifier chosen for each, that
// every write follows its conversion by one cycle, the (i, j) tags of the ALU
// starts in row-major order, the row source at each Shift H, that Shift V
// never coincides with an ALU step other than the last, and that row n is
// converted while row n-2 is in the ALU (40 overlapping cycles).
// Then holds `run` high: frames must follow every 1 + SLOTS*SLOT_CYC cycles
// with one overlapped precharge and EXPOSURE integrate cycles each, placed
// after the last conversion of the current frame; dropping `run` ends the
// sequence after the current frame.
module tb_pe_controller;
  import mv_pkg::*;
  localparam int unsigned EXPOSURE = 16;
  logic clk = 0, rst_n = 0, start = 0, run = 0;
  logic busy, frame_done, precharge, integrate, sample, amp_sel, adc_convert, wr_en;
  logic shift_v, shift_h, capture_first, capture_last, alu_start;
  logic [2:0] row_sel, col_sel, wr_addr;
  logic [5:0] tag;
  row_src_e row_src;
  int checks = 0, failures = 0;

  pe_controller #(.EXPOSURE(EXPOSURE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (8000) @(posedge clk);
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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int cyc, n_busy, n_pre, n_int, n_smp, n_conv, n_wr, n_sv, n_sh, n_alu, n_cf, n_cl, n_both;
      int last_conv_cyc, last_conv_col, alu_idx, sh_idx, conv_idx, alu_phase;
      int row_order [8] = '{7, 0, 1, 2, 3, 4, 5, 6};
      row_src_e src_order [10];
      src_order = '{SRC_PREV_ROW, SRC_COL1, SRC_COL1, SRC_COL1, SRC_COL1, SRC_COL1,
                    SRC_COL1, SRC_COL1, SRC_OWN_LAST, SRC_NEXT_ROW};
      {cyc, n_busy, n_pre, n_int, n_smp, n_conv, n_wr, n_sv, n_sh, n_alu, n_cf, n_cl, n_both} = '0;
      last_conv_cyc = -10; last_conv_col = 0; alu_idx = 0; sh_idx = 0; conv_idx = 0; alu_phase = -1;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!frame_done && cyc < 2000) begin
        cyc++;
        n_busy += int'(busy);
        n_pre += int'(precharge); n_int += int'(integrate); n_smp += int'(sample);
        if (adc_convert) begin
          check("conv row", int'(row_sel), row_order[conv_idx / UNIT]);
          check("conv col", int'(col_sel), conv_idx % UNIT);
          check("amp_sel", int'(amp_sel), int'(row_sel >= 4));
          conv_idx++; n_conv++; last_conv_cyc = cyc; last_conv_col = int'(col_sel);
        end
        if (wr_en) begin
          check("write follows conversion", cyc - last_conv_cyc, 1);
          check("write address", int'(wr_addr), last_conv_col);
          n_wr++;
        end
        if (alu_start) begin
          check("alu tag", int'(tag), alu_idx);
          alu_idx++; n_alu++; alu_phase = 0;
        end else if (alu_phase >= 0) alu_phase++;
        if (shift_v) begin
          n_sv++;
          if (alu_phase >= 0 && alu_phase < ALU_STEPS - 1) begin
            failures++; checks++;
            $display("FAIL Shift V during ALU step %0d", alu_phase);
          end
        end
        if (alu_phase == ALU_STEPS - 1) alu_phase = -1;
        if (shift_h) begin
          check("row source", int'(row_src), int'(src_order[sh_idx]));
          check("capture_last only in slot 0", int'(capture_last), int'(sh_idx == 0));
          check("capture_first only in slot 1", int'(capture_first), int'(sh_idx == 1));
          sh_idx++; n_sh++;
        end
        n_cf += int'(capture_first); n_cl += int'(capture_last);
        n_both += int'(adc_convert && alu_start);
        @(negedge clk);
      end
      check("start to frame_done", cyc + 1, 3 + EXPOSURE + SLOTS * SLOT_CYC);
      check("busy cycles", n_busy, 2 + EXPOSURE + SLOTS * SLOT_CYC);
      check("precharge", n_pre, 1);
      check("integrate", n_int, EXPOSURE);
      check("sample", n_smp, 1);
      check("conversions", n_conv, UNIT * UNIT);
      check("writes", n_wr, UNIT * UNIT);
      check("shift v", n_sv, SLOTS * COL_N);
      check("shift h", n_sh, SLOTS - 1);
      check("alu starts", n_alu, UNIT * UNIT);
      check("capture first", n_cf, 1);
      check("capture last", n_cl, 1);
      check("pipeline overlap", n_both, 5 * UNIT);
      @(negedge clk);
      check("idle after frame", int'(busy), 0);
      repeat (3) @(negedge clk);
    end
    // Continuous mode: frames back to back, next exposure overlapped
    begin
      int cyc, last_done, n_done, n_pre, n_int, last_conv, pre_cyc;
      cyc = 0; last_done = -1; n_done = 0; n_pre = 0; n_int = 0; last_conv = -1; pre_cyc = -1;
      run = 1;
      while (n_done < 4 && cyc < 3000) begin
        @(negedge clk);
        cyc++;
        if (adc_convert) last_conv = cyc;
        if (precharge) begin n_pre++; pre_cyc = cyc; end
        if (integrate) n_int++;
        if (precharge && n_done > 0)
          check("overlapped precharge after the last conversion", int'(pre_cyc > last_conv), 1);
        if (frame_done) begin
          if (n_done > 0) begin
            check("continuous frame period", cyc - last_done, 1 + SLOTS * SLOT_CYC);
            // run is dropped at the third frame_done, so the last frame exposes nothing
            check("precharges in frame", n_pre, (n_done < 3) ? 1 : 0);
            check("integrate cycles in frame", n_int, (n_done < 3) ? EXPOSURE : 0);
          end
          n_pre = 0; n_int = 0;
          last_done = cyc;
          n_done++;
          if (n_done == 3) run = 0;
        end
      end
      check("continuous frames", n_done, 4);
      repeat (2) @(negedge clk);
      check("idle after run drops", int'(busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
