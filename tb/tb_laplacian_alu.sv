// tb_laplacian_alu: self-checking test of the Laplacian ALU.
// Feeds random 4-bit cross windows back to back (a new start every five
// clocks, as the controller does) and after single isolated starts, and
// checks every result against f(i-1,j)+f(i+1,j)+f(i,j-1)+f(i,j+1)-4f(i,j)
// computed here, the tag, and the five-cycle latency from start to valid.
module tb_laplacian_alu;
  import mv_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, valid;
  cross_t win;
  logic [7:0] tag_in = 0, tag_out;
  res_t result;
  int checks = 0, failures = 0;
  int cyc = 0;
  int start_cyc [$];
  int exp_q [$];
  int tag_q [$];

  laplacian_alu #(.TAG_W(8)) dut (.clk, .rst_n, .start, .win, .tag_in, .result, .tag_out, .valid);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result checker
  always @(posedge clk) if (rst_n && valid) begin
    int e, t, s;
    e = exp_q.pop_front(); t = tag_q.pop_front(); s = start_cyc.pop_front();
    checks++;
    if (int'(result) != e || int'(tag_out) != t || cyc - s != ALU_STEPS) begin
      failures++;
      if (failures < 10) $display("FAIL result=%0d exp=%0d tag=%0d/%0d latency=%0d", result, e, tag_out, t, cyc - s);
    end
  end

  task automatic issue(input bit gap, input cross_t w);
    @(negedge clk);
    win = w; start = 1; tag_in = 8'($urandom);
    exp_q.push_back(int'(w.prev_row) + int'(w.next_row) + int'(w.prev_pix) + int'(w.next_pix) - 4*int'(w.center));
    tag_q.push_back(int'(tag_in));
    start_cyc.push_back(cyc);
    @(negedge clk); start = 0;
    repeat (ALU_STEPS - 2) @(negedge clk);
    if (gap) repeat ($urandom_range(1, 4)) @(negedge clk);
  endtask

  initial begin
    win = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // extremes: +60 and -60
    issue(1'b0, '{prev_row: 4'hf, prev_pix: 4'hf, next_pix: 4'hf, next_row: 4'hf, center: 4'h0});
    issue(1'b0, '{prev_row: 4'h0, prev_pix: 4'h0, next_pix: 4'h0, next_row: 4'h0, center: 4'hf});
    for (int n = 0; n < 400; n++) issue(n % 3 == 0, cross_t'($urandom));
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
