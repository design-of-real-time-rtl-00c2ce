// mv_pkg: shared sizes, types and frame-timing constants of the microvision.
//
// One unit system (processor element) covers an 8x8 block of pixels, digitised
// to 4 bits. Its register array holds four columns of ten 4-bit entries: eight
// pixels of one image row plus the two "verge" pixels that come from the
// neighbouring units above and below. The Laplacian result of a pixel lies in
// -60..+60 and is carried as an 8-bit two's-complement number.
//
// The frame timing constants describe this design's own schedule (the document
// gives the row-level pipeline, not cycle counts): each pixel takes
// ALU_STEPS clocks in the ALU, one readout slot handles one image row, and a
// frame is SLOTS readout slots long.
package mv_pkg;
  localparam int unsigned UNIT       = 8;            // pixels per side of a unit (Table 1)
  localparam int unsigned PIX_W      = 4;            // ADC resolution (Sec. II.2.2)
  localparam int unsigned COL_N      = UNIT + 2;     // entries per register column incl. verges
  localparam int unsigned RES_W      = 8;            // signed Laplacian result width
  localparam int unsigned LEVEL_W    = 12;           // code width of an analog level in the models

  localparam int unsigned ALU_STEPS  = 5;            // one operand per clock: 4 neighbours, then -4f
  localparam int unsigned SHIFTV_N   = COL_N;        // Shift V pulses per slot (one full rotation)
  localparam int unsigned SLOT_CYC   = UNIT*ALU_STEPS + (SHIFTV_N-UNIT) + 1; // + Shift H cycle
  localparam int unsigned SLOTS      = UNIT + 3;     // row 0, rows 1..8, row 9, drain

  typedef logic [PIX_W-1:0]        pix_t;
  typedef logic signed [RES_W-1:0] res_t;
  typedef pix_t                    col_t [COL_N];    // one register column, index 0 = top verge
  typedef pix_t                    row_t [UNIT];     // one image row of a unit

  // Cross-shaped window handed to the ALU (Fig. 3: 4 bit x 5).
  typedef struct packed {
    pix_t prev_row;  // f(i-1, j): same pixel of the preceding image row
    pix_t prev_pix;  // f(i, j-1)
    pix_t next_pix;  // f(i, j+1)
    pix_t next_row;  // f(i+1, j)
    pix_t center;    // f(i, j)
  } cross_t;

  // Where the row that enters column 2 at Shift H comes from.
  typedef enum logic [1:0] {
    SRC_COL1      = 2'd0,  // the row just converted into column 1
    SRC_PREV_ROW  = 2'd1,  // last row of the preceding unit (4x16 bus)
    SRC_OWN_LAST  = 2'd2,  // this unit's last row, converted first and held
    SRC_NEXT_ROW  = 2'd3   // first row of the following unit (4x16 bus)
  } row_src_e;
endpackage
