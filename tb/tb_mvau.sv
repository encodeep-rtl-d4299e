// tb_mvau: self-checking test of the Matrix-Vector-Activation Unit.
// Loads random weight codes (FINN-style layout: neuron n on PE n%PE, fold
// n/PE; input i in lane i%SIMD of word fold*SF + i/SIMD), a random weight
// codebook into every PE, an input codebook, a sorted output codebook with
// c[0] = 0, and per-neuron gamma/beta. Streams NVEC random encoded input
// vectors with random gaps and random output back-pressure and compares each
// output beat (PE codes) with decode -> dot product -> batch norm -> nearest
// code computed here. Also checks that the input-vector buffer is reused
// (each vector is sent once for NF folds), that the encoder hold-back stall
// happened and that negative results were clamped to code 0 (ReLU).
module tb_mvau;
  import encodeep_pkg::*;
  localparam int MW = 12, MH = 6, SIMD = 3, PE = 2, IBITS = 2, WBITS = 3, OBITS = 2;
  localparam int SF = MW / SIMD, NF = MH / PE;
  localparam int NVEC = 6;
  localparam int KI = 1 << IBITS, KW = 1 << WBITS, KO = 1 << OBITS;

  logic clk = 0, rst_n = 0;
  logic cfg_en = 0;
  cfg_wr_t cfg = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, evt_stall;
  logic [SIMD*IBITS-1:0] in_data = '0;
  logic [PE*OBITS-1:0] out_data;
  int checks = 0, failures = 0, stalls = 0, relu = 0, in_beats = 0;

  fix_t icb [KI], wcb [KW], ocb [KO];
  fix_t gam [MH], bet [MH];
  int   wc [MH][MW];
  int   xin [NVEC][MW];

  mvau #(.MW(MW), .MH(MH), .SIMD(SIMD), .PE(PE), .IBITS(IBITS), .WBITS(WBITS), .OBITS(OBITS),
         .ENCODE_OUT(1'b1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (evt_stall) stalls++;
    if (in_valid && in_ready) in_beats++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(cfg_tgt_e tgt, int pe_i, int lane, int addr, int data);
    cfg_en = 1; cfg = '0; cfg.tgt = tgt; cfg.pe = 8'(pe_i); cfg.lane = 8'(lane);
    cfg.addr = 20'(addr); cfg.data = 16'(data);
    @(negedge clk);
    cfg_en = 0;
  endtask

  function automatic int ref_code(int v, int n);
    longint acc, y;
    int best, bi;
    acc = 0;
    for (int i = 0; i < MW; i++) acc += longint'(icb[xin[v][i]]) * longint'(wcb[wc[n][i]]);
    y = ((longint'(gam[n]) * acc) >>> (2 * FRAC)) + longint'(bet[n]);
    if (y > 32767) y = 32767;
    if (y < -32768) y = -32768;
    best = 1 << 30; bi = 0;
    for (int k = 0; k < KO; k++) begin
      int d;
      d = int'(y) - int'(ocb[k]);
      if (d < 0) d = -d;
      if (d < best) begin best = d; bi = k; end
    end
    return bi;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < KI; k++) begin icb[k] = fix_t'(k * 80); wr(TGT_ICB, 0, 0, k, int'(icb[k])); end
    for (int k = 0; k < KO; k++) begin ocb[k] = fix_t'(k * 100); wr(TGT_OCB, 0, 0, k, int'(ocb[k])); end
    for (int k = 0; k < KW; k++) wcb[k] = fix_t'($urandom_range(0, 400) - 200);
    for (int p = 0; p < PE; p++) for (int k = 0; k < KW; k++) wr(TGT_WCB, p, 0, k, int'(wcb[k]));
    for (int n = 0; n < MH; n++) begin
      gam[n] = fix_t'($urandom_range(128, 384)); bet[n] = fix_t'($urandom_range(0, 200) - 100);
      wr(TGT_GAMMA, n % PE, 0, n / PE, int'(gam[n]));
      wr(TGT_BETA,  n % PE, 0, n / PE, int'(bet[n]));
      for (int i = 0; i < MW; i++) begin
        wc[n][i] = $urandom_range(0, KW - 1);
        wr(TGT_WMEM, n % PE, i % SIMD, (n / PE) * SF + i / SIMD, wc[n][i]);
      end
    end
    for (int v = 0; v < NVEC; v++) for (int i = 0; i < MW; i++) xin[v][i] = $urandom_range(0, KI - 1);

    fork
      begin : drive
        for (int v = 0; v < NVEC; v++)
          for (int s = 0; s < SF; s++) begin
            @(negedge clk);
            while ($urandom_range(0, 3) == 0) @(negedge clk);
            in_valid = 1;
            for (int l = 0; l < SIMD; l++) in_data[l*IBITS +: IBITS] = IBITS'(xin[v][s*SIMD + l]);
            @(posedge clk);
            while (!in_ready) @(posedge clk);
            #1 in_valid = 0;
          end
      end
      begin : sink
        for (int v = 0; v < NVEC; v++)
          for (int f = 0; f < NF; f++) begin
            @(negedge clk);
            out_ready = ($urandom_range(0, 2) != 0);
            @(posedge clk);
            while (!(out_valid && out_ready)) begin
              #1 out_ready = ($urandom_range(0, 2) != 0);
              @(posedge clk);
            end
            for (int p = 0; p < PE; p++) begin
              int want;
              want = ref_code(v, f * PE + p);
              checks++;
              if (int'(out_data[p*OBITS +: OBITS]) != want) begin
                failures++;
                $display("vec %0d neuron %0d: code %0d want %0d", v, f*PE + p, out_data[p*OBITS +: OBITS], want);
              end
              if (want == 0) relu++;
            end
            #1 out_ready = 0;
          end
      end
    join
    checks++;
    if (in_beats != NVEC * SF) begin failures++; $display("input beats %0d want %0d", in_beats, NVEC * SF); end
    checks++;
    if (stalls == 0 || relu == 0) begin failures++; $display("stall %0d / zero-code %0d not exercised", stalls, relu); end
    $display("encoder hold-back stall cycles: %0d, zero codes: %0d", stalls, relu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
