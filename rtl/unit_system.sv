// unit_system: one processor element of the microvision, the 8x8-pixel unit
// that is stacked through four layers (Table 1 / Fig. 2 of the design):
//   layer 1  photodetector_array  8x8 photodiodes with hold capacitors
//   layer 2  2 x sense_amplifier + flash_adc  (4-bit samples)
//   layer 3  register_array       4-bit D-FF array with Shift H / Shift V
//   layer 4  laplacian_alu        Laplacian ALU and output register
// sequenced by pe_controller. The wires between these instances are the
// vertical interconnections between the layers.
//
// A `start` pulse exposes and reads out one frame; while `run` is high frames
// repeat back to back, the next one exposed during the current readout, one
// frame every 474 clocks (see pe_controller); every pixel (i,j) of the
// unit (0-based, i = image row, j = pixel within the row) appears once on
// `result` with `res_i`/`res_j` while `res_valid` is high. Results are
// produced row by row, one every five clocks; `frame_done` pulses when the
// frame is complete, 3 + EXPOSURE + 11*43 clocks after the cycle with `start`.
// Neighbour ports (the 4x16 and 4x2 line buses of the multi-processor chip):
//   row_to_next  / prev_row_in   column 1 of the unit, read by the following
//                                unit at the end of readout slot 0 (8 pixels)
//   row_to_prev  / next_row_in   the unit's first row, read by the
//                                preceding unit in slot 9 (8 pixels)
//   verge_up_out / verge_bot_in  pixel j=0 of each row, to/from the unit above
//                                (in j) as its bottom verge
//   verge_dn_out / verge_top_in  pixel j=7, to/from the unit below
// All units of a chip must be started in the same cycle (lockstep).
module unit_system
  import mv_pkg::*;
#(
  parameter int unsigned EXPOSURE = 16,
  parameter int unsigned GAIN     = 16,
  parameter int unsigned LIGHT_W  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               run,
  input  logic [LIGHT_W-1:0] light [UNIT][UNIT],
  // neighbour buses
  input  pix_t               prev_row_in [UNIT],
  input  pix_t               next_row_in [UNIT],
  input  pix_t               verge_top_in,
  input  pix_t               verge_bot_in,
  output pix_t               row_to_next [UNIT],
  output pix_t               row_to_prev [UNIT],
  output pix_t               verge_up_out,
  output pix_t               verge_dn_out,
  // output circuit
  output res_t               result,
  output logic [2:0]         res_i,
  output logic [2:0]         res_j,
  output logic               res_valid,
  output logic               busy,
  output logic               frame_done,
  // activity, for observation
  output logic               shift_v_o,
  output logic               shift_h_o,
  output logic               adc_convert_o,
  output logic               alu_start_o
);
  logic precharge, integrate, sample, amp_sel, adc_convert, wr_en;
  logic shift_v, shift_h, capture_first, capture_last, alu_start;
  logic [2:0] row_sel, col_sel, wr_addr;
  logic [5:0] tag, tag_out;
  row_src_e   row_src;

  logic [LEVEL_W-1:0] pd0, pd1, amp0, amp1;
  pix_t   adc_q;
  logic   adc_valid;
  cross_t win;

  pe_controller #(.EXPOSURE(EXPOSURE)) u_ctrl (
    .clk, .rst_n, .start, .run, .busy, .frame_done,
    .precharge, .integrate, .sample, .row_sel, .col_sel, .amp_sel, .adc_convert,
    .wr_en, .wr_addr, .shift_v, .shift_h, .row_src, .capture_first, .capture_last,
    .alu_start, .tag
  );

  photodetector_array #(.LIGHT_W(LIGHT_W)) u_pd (
    .clk, .precharge, .integrate, .sample, .light, .row_sel, .col_sel,
    .out0(pd0), .out1(pd1)
  );

  sense_amplifier #(.GAIN(GAIN)) u_amp0 (.in(pd0), .out(amp0));
  sense_amplifier #(.GAIN(GAIN)) u_amp1 (.in(pd1), .out(amp1));

  flash_adc u_adc (
    .clk, .rst_n, .convert(adc_convert), .sel(amp_sel), .vin0(amp0), .vin1(amp1),
    .dout(adc_q), .dvalid(adc_valid)
  );

  register_array u_regs (
    .clk, .rst_n,
    .wr_en(wr_en && adc_valid), .wr_addr, .wr_data(adc_q),
    .shift_h, .shift_v, .row_src, .capture_first, .capture_last,
    .prev_row_in, .next_row_in, .verge_top_in, .verge_bot_in,
    .col1_out(row_to_next), .first_out(row_to_prev),
    .vert_first_out(verge_up_out), .vert_last_out(verge_dn_out),
    .win
  );

  laplacian_alu #(.TAG_W(6)) u_alu (
    .clk, .rst_n, .start(alu_start), .win, .tag_in(tag),
    .result, .tag_out, .valid(res_valid)
  );

  assign res_i         = tag_out[5:3];
  assign res_j         = tag_out[2:0];
  assign shift_v_o     = shift_v;
  assign shift_h_o     = shift_h;
  assign adc_convert_o = adc_convert;
  assign alu_start_o   = alu_start;
endmodule
