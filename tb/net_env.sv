// net_env: stimulus, reference model and checker for one encoded network
// engine (encodeep_lenet or encodeep_vgg7), used by the end-to-end
// testbenches.
//
// The network is described by parameters: NL layers, each either a 'valid'
// KD x KD convolution (KD > 0, optionally followed by 2x2 max pooling) or a
// fully connected layer (KD = 0), with MH outputs, PE engines, WB weight bits
// and OB output code bits (the last layer outputs raw 16-bit logits). The
// SIMD width of layer l is PE of layer l-1 (CIN for the first layer), as in
// the engines.
//
// The environment builds a random encoded network (weight codes, weight
// codebooks, sorted activation codebooks with c[0] = 0, per-neuron gamma and
// beta), writes it through the command port, plus one write to a layer that
// does not exist, streams NIMG random images with random input gaps, and
// takes the logits with random back-pressure. Every logit is compared with a
// bit-exact model computed here: decode, MAC, batch norm, nearest-code
// encoding, max pooling on codes, raw last layer. It counts each mechanism
// and fails if one never happened: encoder hold-back stall, ReLU clamping by
// the encoder, replay of a buffered input vector, output back-pressure,
// several layers working at once, the rejected write, and (if a pooled map
// has odd size) dropped rows/columns. 'done' rises when it has finished;
// checks/failures are then final.
module net_env
  import encodeep_pkg::*;
#(
  parameter int    MAXL   = 9,
  parameter string NAME   = "net",
  parameter int    NL     = 4,
  parameter int    IMG    = 12,
  parameter int    CIN    = 1,
  parameter int    A0     = 8,
  parameter int    NIMG   = 2,
  parameter int    OUT_PE = 1,             // PE of the last layer
  // per-layer lists, MAXL entries; entries from NL on are not used
  parameter int    KD   [MAXL] = '{3, 3, 0, 0, 0, 0, 0, 0, 0},
  parameter int    POOL [MAXL] = '{1, 1, 0, 0, 0, 0, 0, 0, 0},
  parameter int    MH   [MAXL] = '{4, 8, 16, 4, 0, 0, 0, 0, 0},
  parameter int    PE   [MAXL] = '{2, 2, 4, 1, 0, 0, 0, 0, 0},
  parameter int    WB   [MAXL] = '{3, 4, 2, 4, 0, 0, 0, 0, 0},
  parameter int    OB   [MAXL] = '{2, 2, 3, 1, 0, 0, 0, 0, 0}
) (
  input  logic                     clk,
  output logic                     rst_n,
  output logic                     cmd_valid,
  input  logic                     cmd_ready,
  output cfg_wr_t                  cmd,
  output logic                     in_valid,
  input  logic                     in_ready,
  output logic [CIN*A0-1:0]        in_data,
  input  logic                     out_valid,
  output logic                     out_ready,
  input  logic [OUT_PE*BFIX-1:0]   out_data,
  input  logic [NL-1:0]            evt_stall,
  input  logic [31:0]              init_writes,
  input  logic [31:0]              init_errors,
  input  logic [NL-1:0]            probe_issue,    // MVAU l issues a beat
  input  logic [NL-1:0]            probe_replay,   // ... taken from its vector buffer
  output logic                     done,
  output int                       checks,
  output int                       failures
);
  localparam int NCLASS = MH[NL-1];

  int L_MW [NL], L_SIMD [NL], L_IB [NL], L_DIN [NL], L_CIN [NL];
  int wq   [NL][];
  int wcb  [NL][];
  int icb  [NL][];
  int ocb  [NL][];
  int gam  [NL][];
  int bet  [NL][];
  int img  [NIMG][];
  int logit[NIMG][];

  int n_stall = 0, n_relu = 0, n_replay = 0, n_backp = 0, n_overlap = 0, n_drop = 0;
  longint cyc = 0;
  bit odd_pool = 0;

  initial begin
    rst_n = 0; cmd_valid = 0; cmd = '0; in_valid = 0; in_data = '0; out_ready = 0;
    done = 0; checks = 0; failures = 0;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (|evt_stall) n_stall++;
      if (out_valid && !out_ready) n_backp++;
      if (|(probe_issue & probe_replay)) n_replay++;
      if ($countones(probe_issue) >= 2) n_overlap++;
    end
  end

  // ---------------- reference model ----------------
  function automatic int bn(int l, int n, longint acc);
    longint y;
    y = ((longint'(gam[l][n]) * acc) >>> (2 * FRAC)) + longint'(bet[l][n]);
    if (y > 32767) y = 32767;
    if (y < -32768) y = -32768;
    return int'(y);
  endfunction

  function automatic int enc(int l, int y);
    int best, bi;
    best = 1 << 30; bi = 0;
    for (int k = 0; k < (1 << OB[l]); k++) begin
      int d;
      d = y - ocb[l][k];
      if (d < 0) d = -d;
      if (d < best) begin best = d; bi = k; end
    end
    if (y < 0) n_relu++;
    return bi;
  endfunction

  function automatic int neuron(int l, int n, input int v[]);
    longint acc;
    acc = 0;
    for (int i = 0; i < L_MW[l]; i++)
      acc += longint'(icb[l][v[i]]) * longint'(wcb[l][wq[l][n * L_MW[l] + i]]);
    return bn(l, n, acc);
  endfunction

  // map stored as (y*D + x)*C + c
  function automatic void conv(int l, int D, int C, input int fin[], output int fout[]);
    int OD, K;
    int v[];
    K = KD[l]; OD = D - K + 1;
    fout = new[OD * OD * MH[l]];
    v = new[K * K * C];
    for (int oy = 0; oy < OD; oy++) for (int ox = 0; ox < OD; ox++) begin
      for (int ky = 0; ky < K; ky++) for (int kx = 0; kx < K; kx++) for (int c = 0; c < C; c++)
        v[(ky * K + kx) * C + c] = fin[((oy + ky) * D + ox + kx) * C + c];
      for (int n = 0; n < MH[l]; n++) fout[(oy * OD + ox) * MH[l] + n] = enc(l, neuron(l, n, v));
    end
  endfunction

  function automatic void pool(int D, int C, input int fin[], output int fout[]);
    int Q;
    Q = D / 2;
    if ((D % 2) != 0) n_drop++;
    fout = new[Q * Q * C];
    for (int oy = 0; oy < Q; oy++) for (int ox = 0; ox < Q; ox++) for (int c = 0; c < C; c++) begin
      int m;
      m = 0;
      for (int py = 0; py < 2; py++) for (int px = 0; px < 2; px++)
        if (fin[((2*oy + py) * D + 2*ox + px) * C + c] > m) m = fin[((2*oy + py) * D + 2*ox + px) * C + c];
      fout[(oy * Q + ox) * C + c] = m;
    end
  endfunction

  function automatic void run_ref(int m);
    int cur[], nxt[];
    cur = img[m];
    for (int l = 0; l < NL; l++) begin
      if (KD[l] > 0) begin
        int OD;
        conv(l, L_DIN[l], L_CIN[l], cur, nxt);
        OD = L_DIN[l] - KD[l] + 1;
        if (POOL[l] != 0) begin cur = nxt; pool(OD, MH[l], cur, nxt); end
      end else begin
        nxt = new[MH[l]];
        for (int n = 0; n < MH[l]; n++)
          nxt[n] = (l < NL - 1) ? enc(l, neuron(l, n, cur)) : neuron(l, n, cur);
      end
      cur = nxt;
    end
    logit[m] = cur;
  endfunction

  // ---------------- parameter loading ----------------
  task automatic wr(int layer, cfg_tgt_e tgt, int pe_i, int lane, int addr, int data);
    cmd_valid = 1;
    cmd.layer = 4'(layer); cmd.tgt = tgt; cmd.pe = 8'(pe_i); cmd.lane = 8'(lane);
    cmd.addr = 20'(addr); cmd.data = 16'(data);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    #1 cmd_valid = 0;
  endtask

  task automatic geometry();
    int D, C;
    D = IMG; C = CIN;
    for (int l = 0; l < NL; l++) begin
      L_DIN[l] = D; L_CIN[l] = C;
      L_SIMD[l] = (l == 0) ? CIN : PE[l-1];
      L_IB[l] = (l == 0) ? A0 : OB[l-1];
      if (KD[l] > 0) begin
        L_MW[l] = KD[l] * KD[l] * C;
        D = D - KD[l] + 1;
        if (POOL[l] != 0) begin
          if ((D % 2) != 0) odd_pool = 1;
          D = D / 2;
        end
      end else begin
        L_MW[l] = D * D * C;
        D = 1;
      end
      C = MH[l];
    end
  endtask

  task automatic build_and_load();
    for (int l = 0; l < NL; l++) begin
      int KW, SF;
      real g;
      KW = 1 << WB[l];
      SF = L_MW[l] / L_SIMD[l];
      wcb[l] = new[KW];
      for (int k = 0; k < KW; k++) wcb[l][k] = $urandom_range(0, 256) - 128;
      icb[l] = new[1 << L_IB[l]];
      if (l == 0) for (int k = 0; k < (1 << A0); k++) icb[l][k] = k;     // pixel code k = k/256
      else        icb[l] = ocb[l-1];                                      // ReLU: Act(c) = c
      if (l < NL - 1) begin
        ocb[l] = new[1 << OB[l]];
        ocb[l][0] = 0;
        for (int k = 1; k < (1 << OB[l]); k++)
          ocb[l][k] = ocb[l][k-1] + $urandom_range(24, 56);
      end
      gam[l] = new[MH[l]]; bet[l] = new[MH[l]];
      g = 256.0 * 3.0 / $sqrt(real'(L_MW[l]));
      wq[l] = new[MH[l] * L_MW[l]];
      for (int n = 0; n < MH[l]; n++) begin
        gam[l][n] = int'(g * (0.75 + 0.5 * real'($urandom_range(0, 100)) / 100.0));
        bet[l][n] = $urandom_range(0, 96) - 16;
        for (int i = 0; i < L_MW[l]; i++) wq[l][n * L_MW[l] + i] = $urandom_range(0, KW - 1);
      end
      for (int k = 0; k < (1 << L_IB[l]); k++) wr(l, TGT_ICB, 0, 0, k, icb[l][k]);
      if (l < NL - 1) for (int k = 0; k < (1 << OB[l]); k++) wr(l, TGT_OCB, 0, 0, k, ocb[l][k]);
      for (int p = 0; p < PE[l]; p++) for (int k = 0; k < KW; k++) wr(l, TGT_WCB, p, 0, k, wcb[l][k]);
      for (int n = 0; n < MH[l]; n++) begin
        wr(l, TGT_GAMMA, n % PE[l], 0, n / PE[l], gam[l][n]);
        wr(l, TGT_BETA,  n % PE[l], 0, n / PE[l], bet[l][n]);
        for (int i = 0; i < L_MW[l]; i++)
          wr(l, TGT_WMEM, n % PE[l], i % L_SIMD[l], (n / PE[l]) * SF + i / L_SIMD[l],
             wq[l][n * L_MW[l] + i]);
      end
    end
    wr(15, TGT_WMEM, 0, 0, 0, 0);   // misaddressed write: must be dropped
  endtask

  // ---------------- stimulus and checking ----------------
  initial begin
    longint t_load, t_img [NIMG];
    int nw;
    repeat (3) @(negedge clk);
    rst_n = 1;
    geometry();
    build_and_load();
    repeat (3) @(posedge clk);
    nw = 0;
    for (int l = 0; l < NL; l++)
      nw += (1 << L_IB[l]) + ((l < NL - 1) ? (1 << OB[l]) : 0) + PE[l] * (1 << WB[l]) +
            MH[l] * (2 + L_MW[l]);
    checks++;
    if (init_writes != 32'(nw) || init_errors != 1) begin
      failures++;
      $display("%s: init writes %0d (want %0d), errors %0d (want 1)", NAME, init_writes, nw, init_errors);
    end
    for (int m = 0; m < NIMG; m++) begin
      img[m] = new[IMG * IMG * CIN];
      for (int i = 0; i < IMG * IMG * CIN; i++) img[m][i] = $urandom_range(0, (1 << A0) - 1);
      run_ref(m);
    end
    t_load = cyc;
    $display("%s: parameters loaded (%0d writes) at cycle %0d", NAME, nw, t_load);
    fork
      begin : drive
        for (int m = 0; m < NIMG; m++)
          for (int i = 0; i < IMG * IMG; i++) begin
            @(negedge clk);
            while ($urandom_range(0, 15) == 0) @(negedge clk);
            in_valid = 1;
            for (int c = 0; c < CIN; c++) in_data[c*A0 +: A0] = A0'(img[m][i * CIN + c]);
            @(posedge clk);
            while (!in_ready) @(posedge clk);
            #1 in_valid = 0;
          end
      end
      begin : sink
        for (int m = 0; m < NIMG; m++) begin
          for (int b = 0; b < NCLASS / OUT_PE; b++) begin
            @(negedge clk);
            out_ready = ($urandom_range(0, 3) != 0);
            @(posedge clk);
            while (!(out_valid && out_ready)) begin
              #1 out_ready = ($urandom_range(0, 3) != 0);
              @(posedge clk);
            end
            for (int p = 0; p < OUT_PE; p++) begin
              int got;
              got = int'($signed(out_data[p*BFIX +: BFIX]));
              checks++;
              if (got != logit[m][b * OUT_PE + p]) begin
                failures++;
                $display("%s: image %0d class %0d: logit %0d want %0d", NAME, m, b*OUT_PE + p, got,
                         logit[m][b*OUT_PE + p]);
              end
            end
            #1 out_ready = 0;
          end
          t_img[m] = cyc;
          $display("%s: image %0d logits done at cycle %0d (+%0d)", NAME, m, t_img[m],
                   t_img[m] - ((m == 0) ? t_load : t_img[m-1]));
        end
      end
    join
    repeat (50) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("%s: unexpected extra output", NAME); end
    $display("%s: stall cycles %0d; relu %0d; replay %0d; back-pressure %0d; overlap %0d; pool drop %0d",
             NAME, n_stall, n_relu, n_replay, n_backp, n_overlap, n_drop);
    checks++; if (n_stall == 0)   begin failures++; $display("%s: no encoder hold-back stall", NAME); end
    checks++; if (n_relu == 0)    begin failures++; $display("%s: no ReLU clamp", NAME); end
    checks++; if (n_replay == 0)  begin failures++; $display("%s: no input-vector replay", NAME); end
    checks++; if (n_backp == 0)   begin failures++; $display("%s: no output back-pressure", NAME); end
    checks++; if (n_overlap == 0) begin failures++; $display("%s: no concurrent layer activity", NAME); end
    checks++; if (odd_pool && n_drop == 0) begin failures++; $display("%s: no pooling drop", NAME); end
    done = 1;
  end

endmodule
