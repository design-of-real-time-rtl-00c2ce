// microvision_top: the multi-processor microvision test chip, a grid of
// PE_ROWS x PE_COLS unit systems (2 x 2 = 16 x 16 pixels by default) that
// detects edges with the 4-neighbour Laplacian over the whole image.
//
// Image coordinates: pixel (y, x), y = image row 0..H-1, x = 0..W-1. Unit
// (r, c) covers rows 8r..8r+7 and columns 8c..8c+7. Inside a unit an image
// row flows through the register columns, so neighbours in y are exchanged
// as whole rows and neighbours in x as single verge pixels:
//   * between units (r, c) and (r+1, c): the 4x16-line bus, carrying the last
//     row of (r, c) down and the first row of (r+1, c) up (2 x 8 pixels);
//   * between units (r, c) and (r, c+1): the 4x2-line bus, carrying one edge
//     pixel of the current row each way (2 pixels).
// Outside the image all neighbour inputs are tied to zero, so border pixels
// see zero-valued neighbours.
// The document shows four units joined by 4x16 and 4x2 buses; which bus runs
// in which image direction and the zero border are this design's reading.
//
// Interface: `light[y][x]` is the light intensity per pixel; a `start` pulse
// runs one frame in all units in lockstep, and holding `run` high repeats
// frames back to back (the next frame is exposed during the readout of the
// current one; `light` is integrated in the last EXPOSURE cycles before each
// `frame_done`). Each unit has its own output
// circuit: `res[r][c]`, `res_y[r][c]`, `res_x[r][c]` are valid while
// `res_valid[r][c]` is high, the units producing their results in parallel.
// `frame_done` pulses when all units have finished. The `*_act` outputs
// expose the shift and pipeline strobes of unit (0,0) for observation.
module microvision_top
  import mv_pkg::*;
#(
  parameter int unsigned PE_ROWS  = 2,
  parameter int unsigned PE_COLS  = 2,
  parameter int unsigned EXPOSURE = 16,
  parameter int unsigned GAIN     = 16,
  parameter int unsigned LIGHT_W  = 8,
  localparam int unsigned H  = PE_ROWS * UNIT,
  localparam int unsigned W  = PE_COLS * UNIT,
  localparam int unsigned YW = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned XW = (W > 1) ? $clog2(W) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               run,
  input  logic [LIGHT_W-1:0] light [H][W],
  output res_t               res       [PE_ROWS][PE_COLS],
  output logic [YW-1:0]      res_y     [PE_ROWS][PE_COLS],
  output logic [XW-1:0]      res_x     [PE_ROWS][PE_COLS],
  output logic               res_valid [PE_ROWS][PE_COLS],
  output logic               busy,
  output logic               frame_done,
  output logic               shift_v_act,
  output logic               shift_h_act,
  output logic               adc_convert_act,
  output logic               alu_start_act
);
  pix_t row_to_next [PE_ROWS][PE_COLS][UNIT];
  pix_t row_to_prev [PE_ROWS][PE_COLS][UNIT];
  pix_t verge_up    [PE_ROWS][PE_COLS];
  pix_t verge_dn    [PE_ROWS][PE_COLS];
  logic [PE_ROWS*PE_COLS-1:0] busy_v, done_v;
  logic sv [PE_ROWS][PE_COLS];
  logic sh [PE_ROWS][PE_COLS];
  logic ac [PE_ROWS][PE_COLS];
  logic as [PE_ROWS][PE_COLS];

  for (genvar r = 0; r < PE_ROWS; r++) begin : g_r
    for (genvar c = 0; c < PE_COLS; c++) begin : g_c
      logic [LIGHT_W-1:0] unit_light [UNIT][UNIT];
      pix_t prev_in [UNIT];
      pix_t next_in [UNIT];
      pix_t vtop, vbot;
      logic [2:0] ri, rj;

      // Image rows/columns of this unit: unit row index = image row,
      // unit pixel index = image column.
      for (genvar i = 0; i < UNIT; i++) begin : g_i
        for (genvar j = 0; j < UNIT; j++) begin : g_j
          assign unit_light[i][j] = light[r*UNIT + i][c*UNIT + j];
        end
        if (r > 0) begin : g_prev
          assign prev_in[i] = row_to_next[r-1][c][i];
        end else begin : g_prev0
          assign prev_in[i] = '0;
        end
        if (r < PE_ROWS - 1) begin : g_next
          assign next_in[i] = row_to_prev[r+1][c][i];
        end else begin : g_next0
          assign next_in[i] = '0;
        end
      end
      if (c > 0) begin : g_left
        assign vtop = verge_dn[r][c-1];
      end else begin : g_left0
        assign vtop = '0;
      end
      if (c < PE_COLS - 1) begin : g_right
        assign vbot = verge_up[r][c+1];
      end else begin : g_right0
        assign vbot = '0;
      end

      unit_system #(.EXPOSURE(EXPOSURE), .GAIN(GAIN), .LIGHT_W(LIGHT_W)) u_unit (
        .clk, .rst_n, .start, .run, .light(unit_light),
        .prev_row_in(prev_in), .next_row_in(next_in),
        .verge_top_in(vtop), .verge_bot_in(vbot),
        .row_to_next(row_to_next[r][c]), .row_to_prev(row_to_prev[r][c]),
        .verge_up_out(verge_up[r][c]), .verge_dn_out(verge_dn[r][c]),
        .result(res[r][c]), .res_i(ri), .res_j(rj), .res_valid(res_valid[r][c]),
        .busy(busy_v[r*PE_COLS + c]), .frame_done(done_v[r*PE_COLS + c]),
        .shift_v_o(sv[r][c]), .shift_h_o(sh[r][c]),
        .adc_convert_o(ac[r][c]), .alu_start_o(as[r][c])
      );

      assign res_y[r][c] = YW'(r*UNIT) + YW'(ri);
      assign res_x[r][c] = XW'(c*UNIT) + XW'(rj);
    end
  end

  assign busy            = |busy_v;
  assign frame_done      = &done_v;
  assign shift_v_act     = sv[0][0];
  assign shift_h_act     = sh[0][0];
  assign adc_convert_act = ac[0][0];
  assign alu_start_act   = as[0][0];
endmodule
