// pe_controller: the wired-logic sequencer of one unit system.
//
// A pulse on `start` runs one frame:
//   PRECHARGE  1 cycle          photodiodes reset (`precharge`)
//   INTEGRATE  EXPOSURE cycles  photodiodes charge with the light (`integrate`)
//   SAMPLE     1 cycle          charge copied to the hold capacitors (`sample`)
//   READOUT    SLOTS slots of SLOT_CYC cycles each, then `frame_done`.
// Within a readout slot, cycle c = 5p + q (p = 0..7 pixel period, q = ALU step)
// for c < 40; cycles 40 and 41 are two extra Shift V pulses and cycle 42 is
// Shift H. In slot s:
//   * conversion (pipeline stage 1): slots 0..7 digitise one sensor row,
//     pixel p at q = 0 (`adc_convert`, with `row_sel`, `col_sel`, `amp_sel`)
//     and write it through the demultiplexer at q = 1 (`wr_en`, `wr_addr`).
//     Slot 0 digitises the unit's last row (it is needed first by the next
//     unit), slots 1..7 rows 1..7.
//   * processing (pipeline stage 2): slots 3..10 run the ALU on image row
//     i = s-2, pixel p, starting at q = 0 (`alu_start`, `tag` = {i-1, p}).
//     So row n is converted while row n-2 is in the ALU, as in the document's
//     timing diagram.
//   * Shift V at q = 4 of each pixel period and at c = 40, 41 (ten per slot);
//     Shift H at c = 42 of slots 0..9 with `row_src`: slot 0 the preceding
//     unit's last row, 1..7 column 1, 8 the unit's own last row, 9 the
//     following unit's first row. `capture_last` in slot 0 and
//     `capture_first` in slot 1 latch column 1 for the neighbours.
// Continuous operation: while `run` is high, frames follow one another. The
// next frame is exposed during the last EXPOSURE+1 cycles of the current
// readout (precharge, then integrate), when the hold capacitors have already
// been read, so the next frame goes straight from the end of readout to
// SAMPLE and READOUT: one frame every 1 + SLOTS*SLOT_CYC cycles (474). This
// overlaps photo detection with processing as in the two-stage pipeline of
// the document; the exact placement is this design's choice.
// The two-stage overlap, the ADC/ALU/Shift V/Shift H interleaving and the
// ordering "(n-2)th row in the ALU while row n is converted" follow the
// document; cycle counts, the state sequence and the neighbour-row ordering
// are this design's own. All outputs are decoded combinationally from the
// state registers. `busy` is high for 2 + EXPOSURE + SLOTS*SLOT_CYC cycles
// (491 with the defaults) from the cycle after `start`, and `frame_done`
// pulses in the cycle after that.
module pe_controller
  import mv_pkg::*;
#(
  parameter int unsigned EXPOSURE = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       run,
  output logic       busy,
  output logic       frame_done,
  // sensor, amplifier and ADC layers
  output logic       precharge,
  output logic       integrate,
  output logic       sample,
  output logic [2:0] row_sel,
  output logic [2:0] col_sel,
  output logic       amp_sel,
  output logic       adc_convert,
  // register layer
  output logic       wr_en,
  output logic [2:0] wr_addr,
  output logic       shift_v,
  output logic       shift_h,
  output row_src_e   row_src,
  output logic       capture_first,
  output logic       capture_last,
  // ALU layer
  output logic       alu_start,
  output logic [5:0] tag
);
  typedef enum logic [2:0] {S_IDLE, S_PRECHARGE, S_INTEGRATE, S_SAMPLE, S_READOUT} state_e;

  localparam int unsigned CW = $clog2(SLOT_CYC);
  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned EW = (EXPOSURE > 1) ? $clog2(EXPOSURE) : 1;

  localparam int unsigned READ_CYC = SLOTS * SLOT_CYC;
  localparam int unsigned PRE_AT   = READ_CYC - EXPOSURE - 1;  // readout cycle of the overlapped precharge
  localparam int unsigned RW       = $clog2(READ_CYC);

  if (EXPOSURE < 1 || EXPOSURE + 1 > READ_CYC) begin : g_bad_exposure
    $error("EXPOSURE must lie in 1 .. SLOTS*SLOT_CYC-1");
  end

  state_e        state;
  logic [RW-1:0] rcnt;        // cycle within the readout
  logic          exposed;     // next frame exposed during this readout
  logic [EW-1:0] ecnt;
  logic [SW-1:0] slot;
  logic [CW-1:0] cyc;

  logic [2:0] period;
  logic [2:0] step;
  logic       in_pixels;
  logic       conv_slot, proc_slot;
  logic [2:0] conv_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ecnt       <= '0;
      rcnt       <= '0;
      exposed    <= 1'b0;
      slot       <= '0;
      cyc        <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        S_IDLE:      if (start || run) state <= S_PRECHARGE;
        S_PRECHARGE: begin state <= S_INTEGRATE; ecnt <= '0; end
        S_INTEGRATE: begin
          if (ecnt == EW'(EXPOSURE - 1)) state <= S_SAMPLE;
          else ecnt <= ecnt + 1'b1;
        end
        S_SAMPLE: begin state <= S_READOUT; slot <= '0; cyc <= '0; rcnt <= '0; exposed <= 1'b0; end
        S_READOUT: begin
          rcnt <= rcnt + 1'b1;
          if (precharge) exposed <= 1'b1;
          if (cyc == CW'(SLOT_CYC - 1)) begin
            cyc <= '0;
            if (slot == SW'(SLOTS - 1)) begin
              state      <= (exposed && run) ? S_SAMPLE : S_IDLE;
              frame_done <= 1'b1;
            end else begin
              slot <= slot + 1'b1;
            end
          end else begin
            cyc <= cyc + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Decode of the readout slot
  always_comb begin
    period    = 3'(cyc / ALU_STEPS);
    step      = 3'(cyc % ALU_STEPS);
    in_pixels = (state == S_READOUT) && (cyc < CW'(UNIT * ALU_STEPS));
    conv_slot = (slot < SW'(UNIT));          // slots 0..7
    proc_slot = (slot >= SW'(3));            // slots 3..10
    conv_row  = (slot == '0) ? 3'(UNIT - 1) : 3'(slot - 1'b1);

    busy      = (state != S_IDLE);
    precharge = (state == S_PRECHARGE) ||
                ((state == S_READOUT) && run && (rcnt == RW'(PRE_AT)));
    integrate = (state == S_INTEGRATE) ||
                ((state == S_READOUT) && exposed && (rcnt > RW'(PRE_AT)));
    sample    = (state == S_SAMPLE);

    row_sel     = conv_row;
    col_sel     = period;
    amp_sel     = conv_row[2];               // rows 1..4 -> amplifier 0, 5..8 -> amplifier 1
    adc_convert = in_pixels && conv_slot && (step == 3'd0);
    wr_en       = in_pixels && conv_slot && (step == 3'd1);
    wr_addr     = period;

    shift_v = (state == S_READOUT) &&
              ((in_pixels && step == 3'(ALU_STEPS - 1)) ||
               (cyc >= CW'(UNIT * ALU_STEPS) && cyc < CW'(SLOT_CYC - 1)));
    shift_h = (state == S_READOUT) && (cyc == CW'(SLOT_CYC - 1)) && (slot < SW'(SLOTS - 1));

    unique case (slot)
      SW'(0):        row_src = SRC_PREV_ROW;
      SW'(UNIT):     row_src = SRC_OWN_LAST;
      SW'(UNIT + 1): row_src = SRC_NEXT_ROW;
      default:       row_src = SRC_COL1;
    endcase
    capture_last  = shift_h && (slot == SW'(0));
    capture_first = shift_h && (slot == SW'(1));

    alu_start = in_pixels && proc_slot && (step == 3'd0);
    tag       = {3'(slot - SW'(3)), period};
  end
endmodule
