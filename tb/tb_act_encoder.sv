// tb_act_encoder: self-checking test of the online activation encoder.
// Loads a sorted codebook with c[0] = 0, encodes random feature vectors
// (including negative values, exact codebook values and mid-points) and
// compares every code with an argmin |y - c[i]| computed here (lowest index on
// ties). Checks the search latency of K cycles from acceptance to out_valid,
// that the code holds under output back-pressure, and that negative features
// encode to 0 (ReLU).
module tb_act_encoder;
  import encodeep_pkg::*;
  localparam int CBITS = 3;
  localparam int LANES = 4;
  localparam int K = 1 << CBITS;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [CBITS-1:0] wr_addr = '0;
  fix_t wr_data = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  fix_t [LANES-1:0] in_y = '0;
  logic [LANES-1:0][CBITS-1:0] out_code;
  int checks = 0, failures = 0, relu_seen = 0;
  fix_t cb [K];

  act_encoder #(.CBITS(CBITS), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_code(fix_t y);
    int best, bi;
    best = 1 << 30; bi = 0;
    for (int i = 0; i < K; i++) begin
      int d;
      d = int'(y) - int'(cb[i]);
      if (d < 0) d = -d;
      if (d < best) begin best = d; bi = i; end
    end
    return bi;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    cb[0] = 0;
    for (int i = 1; i < K; i++) cb[i] = fix_t'(int'(cb[i-1]) + $urandom_range(20, 200));
    for (int i = 0; i < K; i++) begin
      wr_en = 1; wr_addr = CBITS'(i); wr_data = cb[i];
      @(negedge clk);
    end
    wr_en = 0;
    for (int t = 0; t < 300; t++) begin
      int lat;
      for (int l = 0; l < LANES; l++) begin
        case ($urandom_range(0, 3))
          0: in_y[l] = fix_t'(-$urandom_range(1, 2000));
          1: in_y[l] = cb[$urandom_range(0, K - 1)];
          2: begin int j; j = $urandom_range(0, K - 2); in_y[l] = fix_t'((int'(cb[j]) + int'(cb[j+1])) / 2); end
          default: in_y[l] = fix_t'($urandom_range(0, int'(cb[K-1]) + 300));
        endcase
      end
      in_valid = 1;
      checks++;
      if (!in_ready) begin failures++; $display("encoder not idle"); end
      @(posedge clk); #1;
      in_valid = 0;
      lat = 0;
      while (!out_valid && lat < 100) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != K) begin failures++; $display("latency %0d want %0d", lat, K); end
      // hold under back-pressure
      repeat ($urandom_range(0, 3)) begin
        logic [LANES-1:0][CBITS-1:0] hold;
        hold = out_code;
        @(posedge clk); #1;
        checks++;
        if (!out_valid || out_code !== hold) begin failures++; $display("output not held"); end
      end
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (int'(out_code[l]) != ref_code(in_y[l])) begin
          failures++;
          $display("lane %0d y=%0d code %0d want %0d", l, in_y[l], out_code[l], ref_code(in_y[l]));
        end
        if (in_y[l] < 0) begin
          relu_seen++;
          checks++;
          if (out_code[l] != 0) begin failures++; $display("negative not mapped to 0"); end
        end
      end
      @(negedge clk);
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
    end
    checks++;
    if (relu_seen == 0) begin failures++; $display("ReLU case not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
