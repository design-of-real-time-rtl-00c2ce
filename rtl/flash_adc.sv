// flash_adc: behavioural model of the 4-bit parallel-conversion (flash) ADC
// shared by the two amplifiers of a unit system. It stands in for a
// mixed-signal circuit and is not meant for synthesis.
//
// An input multiplexer chooses amplifier `sel` (0: vin0, 1: vin1). Fifteen
// comparators compare the level with the taps k*FULL_SCALE/16 (k = 1..15) of
// a reference ladder, giving a thermometer code; the encoder turns the number
// of comparators that fire into the 4-bit code. The code is registered in the
// clock cycle in which `convert` is high and appears on `dout` in the next
// cycle, with `dvalid` high for one cycle. The document gives the method
// (parallel conversion), the resolution (4 bits) and the 25 MHz conversion
// rate; the ladder spacing, the mux and the one-cycle latency are this
// model's choices. In this design a conversion is started every fifth clock.
module flash_adc
  import mv_pkg::*;
#(
  parameter int unsigned FULL_SCALE = 4096
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               convert,
  input  logic               sel,
  input  logic [LEVEL_W-1:0] vin0,
  input  logic [LEVEL_W-1:0] vin1,
  output pix_t               dout,
  output logic               dvalid
);
  localparam int unsigned LEVELS = 1 << PIX_W;

  logic [LEVEL_W-1:0] vin;
  logic [LEVELS-2:0]  thermo;
  pix_t               code;

  assign vin = sel ? vin1 : vin0;

  always_comb begin
    for (int k = 1; k < LEVELS; k++)
      thermo[k-1] = (32'(vin) >= (k * FULL_SCALE) / LEVELS);
    code = '0;
    for (int k = 0; k < LEVELS - 1; k++)
      code = code + pix_t'(thermo[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout   <= '0;
      dvalid <= 1'b0;
    end else begin
      dvalid <= convert;
      if (convert) dout <= code;
    end
  end
endmodule
