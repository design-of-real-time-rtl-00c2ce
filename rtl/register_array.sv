// register_array: the register layer of a unit system (Fig. 3 of the design).
//
// Four columns of 4-bit D flip-flops hold consecutive image rows of the unit,
// one image row per column, one pixel per entry:
//   column 1: the row being digitised; eight entries, the demultiplexer
//             writes ADC sample number `wr_addr` (pixel j = wr_addr+1) into
//             entry wr_addr.
//   column 2..4: rows i+1, i, i-1 of the row i being processed. These columns
//             have ten entries: index 0 and 9 are the "verge" pixels j=0 and
//             j=9 that belong to the units above and below.
// Shift H (`shift_h`) moves the columns one place to the right: column 4 is
// dropped, 3<-2, 2<-1 plus the two verge pixels `verge_top_in`/`verge_bot_in`.
// Which row enters column 2 is chosen by `row_src`: column 1, the last row
// of the preceding unit, this unit's own last row held in `last_q`, or the
// first row of the following unit (see mv_pkg::row_src_e).
// Shift V (`shift_v`) rotates the three right columns one entry upwards
// (entry k <- entry k+1, entry 9 <- entry 0). The output window `win` is the
// cross centred on column 3, entry 1: after k Shift V pulses it holds pixel
// j=k+1 of row i with its four neighbours; ten pulses restore the alignment.
// The document gives the array, the demultiplexer, both shifts and the cross;
// the single-entry rotation, the column depth of 8 for column 1 and the
// side registers for the unit's first and last rows are this design's.
//
// `capture_first`/`capture_last` copy column 1 into `first_q` / `last_q`;
// `first_q` and column 1 itself are offered to the neighbouring units.
// `vert_first_out`/`vert_last_out` are pixels 1 and 8 of the row that enters
// column 2 at this Shift H, sent to the units below and above.
// All updates happen on the rising clock edge; `win` is combinational.
module register_array
  import mv_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // demultiplexer from the ADC
  input  logic     wr_en,
  input  logic [2:0] wr_addr,
  input  pix_t     wr_data,
  // shifts
  input  logic     shift_h,
  input  logic     shift_v,
  input  row_src_e row_src,
  input  logic     capture_first,
  input  logic     capture_last,
  // data from neighbouring units
  input  pix_t     prev_row_in [UNIT],
  input  pix_t     next_row_in [UNIT],
  input  pix_t     verge_top_in,
  input  pix_t     verge_bot_in,
  // data to neighbouring units
  output pix_t     col1_out    [UNIT],
  output pix_t     first_out   [UNIT],
  output pix_t     vert_first_out,
  output pix_t     vert_last_out,
  // window to the ALU
  output cross_t   win
);
  pix_t c1      [UNIT];
  pix_t first_q [UNIT];
  pix_t last_q  [UNIT];
  pix_t c2 [COL_N];
  pix_t c3 [COL_N];
  pix_t c4 [COL_N];
  pix_t entering [UNIT];

  always_comb begin
    for (int k = 0; k < UNIT; k++) begin
      unique case (row_src)
        SRC_COL1:     entering[k] = c1[k];
        SRC_PREV_ROW: entering[k] = prev_row_in[k];
        SRC_OWN_LAST: entering[k] = last_q[k];
        default:      entering[k] = next_row_in[k];
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < UNIT; k++) begin
        c1[k] <= '0; first_q[k] <= '0; last_q[k] <= '0;
      end
      for (int k = 0; k < COL_N; k++) begin
        c2[k] <= '0; c3[k] <= '0; c4[k] <= '0;
      end
    end else begin
      if (wr_en) c1[wr_addr] <= wr_data;
      if (capture_first) first_q <= c1;
      if (capture_last)  last_q  <= c1;
      if (shift_h) begin
        c4 <= c3;
        c3 <= c2;
        c2[0] <= verge_top_in;
        for (int k = 0; k < UNIT; k++) c2[k+1] <= entering[k];
        c2[COL_N-1] <= verge_bot_in;
      end else if (shift_v) begin
        for (int k = 0; k < COL_N; k++) begin
          c2[k] <= c2[(k+1) % COL_N];
          c3[k] <= c3[(k+1) % COL_N];
          c4[k] <= c4[(k+1) % COL_N];
        end
      end
    end
  end

  assign col1_out       = c1;
  assign first_out      = first_q;
  assign vert_first_out = entering[0];
  assign vert_last_out  = entering[UNIT-1];

  assign win.prev_row = c4[1];
  assign win.next_row = c2[1];
  assign win.prev_pix = c3[0];
  assign win.next_pix = c3[2];
  assign win.center   = c3[1];

  a_one_shift: assert property (@(posedge clk) disable iff (!rst_n)
    !(shift_h && shift_v));
endmodule
