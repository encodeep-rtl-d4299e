// tb_pe: self-checking test of one processing engine.
// Loads random encoded weights (per SIMD partition), a random weight codebook
// and per-neuron gamma/beta through the cfg port, then streams NF neurons of
// SF beats of random decoded inputs, several rounds, with idle gaps between
// beats. Each result is compared with gamma*(sum x*c[w]) + beta computed here
// in the same fixed-point format, including saturation, and its timing is
// checked: res_valid must pulse exactly 2 cycles after the last beat's stage-1
// cycle.
module tb_pe;
  import encodeep_pkg::*;
  localparam int SIMD = 4, WBITS = 3, NF = 3, SF = 5;
  localparam int K = 1 << WBITS;
  localparam int NFW = (NF > 1) ? $clog2(NF) : 1;

  logic clk = 0, rst_n = 0;
  logic cfg_en = 0;
  cfg_wr_t cfg = '0;
  logic rd_en = 0;
  logic [$clog2(NF*SF)-1:0] rd_addr = '0;
  logic s1_valid = 0, s1_clr = 0, s1_last = 0;
  logic [NFW-1:0] s1_nf = '0;
  fix_t [SIMD-1:0] x_dec = '0;
  logic res_valid;
  fix_t res;
  int checks = 0, failures = 0, sat_seen = 0;

  int wcode [NF][SF*SIMD];
  fix_t wcb [K];
  fix_t gam [NF], bet [NF];
  fix_t xin [SF][SIMD];

  pe #(.SIMD(SIMD), .WBITS(WBITS), .NF(NF), .SF(SF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(cfg_tgt_e tgt, int lane, int addr, int data);
    cfg_en = 1; cfg = '0; cfg.tgt = tgt; cfg.lane = 8'(lane); cfg.addr = 20'(addr); cfg.data = 16'(data);
    @(negedge clk);
    cfg_en = 0;
  endtask

  function automatic fix_t ref_res(int n);
    longint acc, y;
    acc = 0;
    for (int s = 0; s < SF; s++)
      for (int l = 0; l < SIMD; l++)
        acc += longint'(xin[s][l]) * longint'(wcb[wcode[n][s*SIMD+l]]);
    y = ((longint'(gam[n]) * acc) >>> (2 * FRAC)) + longint'(bet[n]);
    if (y > 32767) y = 32767;
    if (y < -32768) y = -32768;
    return fix_t'(y);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < K; i++) begin wcb[i] = fix_t'($urandom_range(0, 1024) - 512); wr(TGT_WCB, 0, i, int'(wcb[i])); end
    for (int n = 0; n < NF; n++) begin
      gam[n] = fix_t'($urandom_range(32, 512)); bet[n] = fix_t'($urandom_range(0, 512) - 256);
      wr(TGT_GAMMA, 0, n, int'(gam[n])); wr(TGT_BETA, 0, n, int'(bet[n]));
      for (int i = 0; i < SF * SIMD; i++) begin
        wcode[n][i] = $urandom_range(0, K - 1);
        wr(TGT_WMEM, i % SIMD, n * SF + i / SIMD, wcode[n][i]);
      end
    end
    for (int round = 0; round < 8; round++) begin
      for (int s = 0; s < SF; s++)
        for (int l = 0; l < SIMD; l++)
          xin[s][l] = (round == 7) ? fix_t'(16'sh7fff) : fix_t'($urandom_range(0, 1024) - 512);
      if (round == 7) begin
        // drive every weight to the largest code value: forces saturation
        for (int n = 0; n < NF; n++) for (int i = 0; i < SF * SIMD; i++) wcode[n][i] = 0;
        wcb[0] = 16'sh7fff; wr(TGT_WCB, 0, 0, 32767);
        for (int n = 0; n < NF; n++) for (int i = 0; i < SF * SIMD; i++) wr(TGT_WMEM, i % SIMD, n * SF + i / SIMD, 0);
      end
      for (int n = 0; n < NF; n++) begin
        for (int s = 0; s < SF; s++) begin
          // stage 0
          rd_en = 1; rd_addr = $bits(rd_addr)'(n * SF + s);
          @(negedge clk);
          rd_en = 0;
          // stage 1
          s1_valid = 1; s1_clr = (s == 0); s1_last = (s == SF - 1); s1_nf = NFW'(n);
          for (int l = 0; l < SIMD; l++) x_dec[l] = xin[s][l];
          @(negedge clk);
          s1_valid = 0;
          if (s == SF - 1) begin
            fix_t want;
            want = ref_res(n);
            checks++;
            if (res_valid) begin failures++; $display("res_valid early"); end
            @(negedge clk);
            checks++;
            if (!res_valid || res !== want) begin
              failures++;
              $display("round %0d neuron %0d: valid=%0b res=%0d want %0d", round, n, res_valid, res, want);
            end
            if (want == 16'sh7fff) sat_seen++;
          end else if ($urandom_range(0, 1) == 1) begin
            @(negedge clk);   // idle gap inside a neuron
          end
        end
      end
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
