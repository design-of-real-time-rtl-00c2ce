// photodetector_array: behavioural model of the sensor layer of one unit
// system (8x8 photodiodes). It stands in for an analog circuit and is not
// meant for synthesis; analog quantities are represented as unsigned codes.
//
// Operation follows the document: the photodiodes are precharged
// (`precharge`), then charge at a rate proportional to the light intensity
// while `integrate` is high (here: charge += light[r][c] per clock, saturating
// at 2^LEVEL_W-1), and the charge is then held on storage capacitors
// (`sample`). The held values are read out one at a time. The 8x8 array is
// split into two 4x8 halves, each feeding its own amplifier (two amplifiers
// per unit): `out0` is the held level of pixel (row_sel[1:0], col_sel) of
// rows 0..3, `out1` that of rows 4..7. The readout is combinational.
// The saturating linear charge law and the row split of the halves are this
// model's own choices.
module photodetector_array
  import mv_pkg::*;
#(
  parameter int unsigned LIGHT_W = 8
) (
  input  logic               clk,
  input  logic               precharge,
  input  logic               integrate,
  input  logic               sample,
  input  logic [LIGHT_W-1:0] light [UNIT][UNIT],
  input  logic [2:0]         row_sel,
  input  logic [2:0]         col_sel,
  output logic [LEVEL_W-1:0] out0,
  output logic [LEVEL_W-1:0] out1
);
  localparam logic [LEVEL_W:0] SAT = {1'b0, {LEVEL_W{1'b1}}};

  logic [LEVEL_W-1:0] diode [UNIT][UNIT];   // charge on the photodiodes
  logic [LEVEL_W-1:0] held  [UNIT][UNIT];   // charge on the hold capacitors

  initial begin
    for (int r = 0; r < UNIT; r++)
      for (int c = 0; c < UNIT; c++) begin
        diode[r][c] = '0;
        held[r][c]  = '0;
      end
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < UNIT; r++)
      for (int c = 0; c < UNIT; c++) begin
        logic [LEVEL_W:0] next;
        next = {1'b0, diode[r][c]} + (LEVEL_W+1)'(light[r][c]);
        if (precharge)      diode[r][c] <= '0;
        else if (integrate) diode[r][c] <= (next > SAT) ? SAT[LEVEL_W-1:0] : next[LEVEL_W-1:0];
        if (sample)         held[r][c]  <= diode[r][c];
      end
  end

  assign out0 = held[{1'b0, row_sel[1:0]}][col_sel];
  assign out1 = held[{1'b1, row_sel[1:0]}][col_sel];
endmodule
