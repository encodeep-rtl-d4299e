// tb_stream_fifo: self-checking test of the streaming buffer.
// Random valid/ready on both sides for many cycles; a queue in the testbench
// is the reference for order and content. Also checks that the buffer fills
// to DEPTH (in_ready low, level = DEPTH) when the consumer stalls, that a full
// buffer accepts a word in the cycle it releases one, and that level tracks
// the reference occupancy.
module tb_stream_fifo;
  localparam int W = 8;
  localparam int DEPTH = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(DEPTH+1)-1:0] level;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int full_seen = 0, pass_full = 0;

  stream_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard at each rising edge
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (int'(level) != q.size()) begin failures++; $display("level %0d want %0d", level, q.size()); end
    if (out_valid && out_ready) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("pop from empty"); end
      else begin
        if (out_data !== q[0]) begin failures++; $display("data %h want %h", out_data, q[0]); end
        void'(q.pop_front());
      end
    end
    if (in_valid && in_ready) q.push_back(in_data);
    if (q.size() == DEPTH) full_seen++;
    if (level == DEPTH && in_valid && in_ready) pass_full++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: fill with consumer stalled
    out_ready = 0;
    for (int i = 0; i < DEPTH + 2; i++) begin
      in_valid = 1; in_data = W'(i + 100);
      @(negedge clk);
    end
    checks++; if (in_ready !== 0 || level != DEPTH) begin failures++; $display("not full after stall"); end
    // push and pop together while full
    out_ready = 1; in_data = 8'hee;
    @(negedge clk);
    in_valid = 0;
    // phase 2: random traffic
    for (int c = 0; c < 4000; c++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      in_data   = W'($urandom);
      out_ready = ($urandom_range(0, 2) != 0);
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (DEPTH + 2) @(negedge clk);
    checks++; if (q.size() != 0 || out_valid) begin failures++; $display("not drained"); end
    checks++; if (full_seen == 0 || pass_full == 0) begin failures++; $display("full case not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
