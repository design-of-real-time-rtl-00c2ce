// laplacian_alu: the processor of a unit system. It computes the 4-neighbour
// Laplacian  g(i,j) = f(i,j-1) + f(i-1,j) + f(i+1,j) + f(i,j+1) - 4 f(i,j)
// of the pixel at the centre of the cross-shaped window of the register array.
//
// As in the document, the ALU is built from a carry lookahead adder, an
// accumulator register, a step counter and an operand multiplexer. The order
// of operations is this design's choice: a pulse on `start` begins a five-step
// sequence, one step per clock, in which the multiplexer feeds
//   step 0: f(i-1,j)          (accumulator cleared)
//   step 1: f(i+1,j)
//   step 2: f(i,j-1)
//   step 3: f(i,j+1)
//   step 4: ~(4 f(i,j)) with carry-in 1, i.e. subtract four times the centre
// to the adder. The window must stay stable during the five steps.
//
// Timing: `start` high in cycle t makes `valid` high for one cycle in t+5
// with `result` (8-bit two's complement, -60..+60) and the `tag_out` that was
// presented with `start`. A new `start` may come in the cycle after step 4,
// so one pixel is finished every five clocks. `result` and `tag_out` hold
// their value until the next pixel completes (the output register of the
// "ALU & output circuit" layer).
module laplacian_alu
  import mv_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  cross_t           win,
  input  logic [TAG_W-1:0] tag_in,
  output res_t             result,
  output logic [TAG_W-1:0] tag_out,
  output logic             valid
);
  logic             busy;
  logic [2:0]       step;       // counter of the current step when busy
  logic [2:0]       cur_step;
  logic             active;
  res_t             acc;
  res_t             opnd, add_a, add_sum;
  logic             add_cin;
  logic [TAG_W-1:0] tag_q;

  assign active   = start || busy;
  assign cur_step = start ? 3'd0 : step;

  // Operand multiplexer
  always_comb begin
    unique case (cur_step)
      3'd0:    opnd = res_t'({4'b0, win.prev_row});
      3'd1:    opnd = res_t'({4'b0, win.next_row});
      3'd2:    opnd = res_t'({4'b0, win.prev_pix});
      3'd3:    opnd = res_t'({4'b0, win.next_pix});
      default: opnd = ~res_t'({2'b0, win.center, 2'b00});
    endcase
    add_a   = (cur_step == 3'd0) ? '0 : acc;
    add_cin = (cur_step == 3'(ALU_STEPS - 1));
  end

  cla_adder #(.W(RES_W)) u_cla (
    .a(add_a), .b(opnd), .cin(add_cin), .sum(add_sum), .cout()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      step    <= '0;
      acc     <= '0;
      result  <= '0;
      valid   <= 1'b0;
      tag_q   <= '0;
      tag_out <= '0;
    end else begin
      valid <= 1'b0;
      if (start) tag_q <= tag_in;
      if (active) begin
        acc <= add_sum;
        if (cur_step == 3'(ALU_STEPS - 1)) begin
          busy    <= 1'b0;
          step    <= '0;
          result  <= add_sum;
          tag_out <= start ? tag_in : tag_q;
          valid   <= 1'b1;
        end else begin
          busy <= 1'b1;
          step <= cur_step + 3'd1;
        end
      end
    end
  end

  // A new pixel may only start once the previous one has finished.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);
endmodule
