// pe: processing engine of an MVAU.
//
// Each PE computes NF output neurons (channels) of its layer. For one neuron it
// consumes SF beats of SIMD decoded inputs; for each beat it reads SIMD encoded
// weights from its local weight SRAM (split into SIMD partitions so all lanes
// read in the same cycle), turns them into fixed-point values through its own
// weight codebook (a codebook_rf register file), forms SIMD products and adds
// their sum to the accumulator. On the last beat of a neuron the completed dot
// product y is batch-normalized, y' = gamma[n]*y + beta[n], with gamma and
// beta held in per-neuron registers, saturated to a BFIX word and offered on
// res/res_valid for one cycle. The neuron order, memory split, codebook
// replication and BN placement follow the source design; the 3-stage timing
// below is this design's.
//
// Timing (driven by the MVAU controller, no back-pressure inside the PE):
//   stage 0: rd_en/rd_addr address the weight SRAM (synchronous read);
//   stage 1: s1_* control and the registered decoded inputs x_dec arrive with
//            the weight word; the product sum is accumulated (s1_clr starts a
//            new neuron, s1_last ends it);
//   stage 2: the finished dot product is registered;
//   stage 3: the batch-normalized result is registered, res_valid pulses.
// Weight SRAM layout: neuron n = nf*PE + pe, input i = sf*SIMD + lane is stored
// in partition 'lane' at word nf*SF + sf.
// Parameters are written through cfg_en/cfg (targets TGT_WMEM, TGT_WCB,
// TGT_GAMMA, TGT_BETA); the MVAU asserts cfg_en only for this PE.
module pe
  import encodeep_pkg::*;
#(
  parameter int unsigned SIMD  = 4,
  parameter int unsigned WBITS = 4,    // encoded weight bits, weight codebook K = 2**WBITS
  parameter int unsigned NF    = 4,    // neurons handled by this PE
  parameter int unsigned SF    = 8,    // SIMD beats per neuron
  localparam int unsigned NFW  = (NF > 1) ? $clog2(NF) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cfg_en,
  input  cfg_wr_t                      cfg,
  input  logic                         rd_en,
  input  logic [$clog2(NF*SF)-1:0]     rd_addr,
  input  logic                         s1_valid,
  input  logic                         s1_clr,
  input  logic                         s1_last,
  input  logic [NFW-1:0]               s1_nf,
  input  fix_t [SIMD-1:0]              x_dec,
  output logic                         res_valid,
  output fix_t                         res
);
  localparam int unsigned DEPTH = NF * SF;
  localparam int unsigned AW    = $clog2(DEPTH);

  // ---- encoded weight SRAM, one partition per SIMD lane ----
  logic [SIMD-1:0][WBITS-1:0] wword;

  for (genvar l = 0; l < SIMD; l++) begin : g_part
    logic [WBITS-1:0] wmem [DEPTH];
    always_ff @(posedge clk) begin
      if (cfg_en && cfg.tgt == TGT_WMEM && cfg.lane == 8'(l))
        wmem[cfg.addr[AW-1:0]] <= cfg.data[WBITS-1:0];
      if (rd_en)
        wword[l] <= wmem[rd_addr];
    end
  end

  // ---- weight decoder (per-PE codebook copy) ----
  fix_t [SIMD-1:0] w_dec;
  codebook_rf #(.CBITS(WBITS), .NRD(SIMD)) u_wcb (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (cfg_en && cfg.tgt == TGT_WCB),
    .wr_addr (cfg.addr[WBITS-1:0]),
    .wr_data (fix_t'(cfg.data)),
    .rd_code (wword),
    .rd_data (w_dec)
  );

  // ---- batch-norm parameters (registers) ----
  fix_t gamma [NF];
  fix_t beta  [NF];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NF; n++) begin
        gamma[n] <= fix_t'(1 << FRAC);
        beta[n]  <= '0;
      end
    end else if (cfg_en) begin
      if (cfg.tgt == TGT_GAMMA) gamma[cfg.addr[NFW-1:0]] <= fix_t'(cfg.data);
      if (cfg.tgt == TGT_BETA)  beta [cfg.addr[NFW-1:0]] <= fix_t'(cfg.data);
    end
  end

  // ---- SIMD multipliers and adder tree ----
  acc_t dot;
  always_comb begin
    dot = '0;
    for (int l = 0; l < SIMD; l++)
      dot = dot + acc_t'($signed(x_dec[l]) * $signed(w_dec[l]));
  end

  // ---- accumulator ----
  acc_t acc, acc_next, s2_acc;
  logic s2_valid;
  logic [NFW-1:0] s2_nf;
  assign acc_next = (s1_clr ? acc_t'(0) : acc) + dot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      s2_valid <= 1'b0;
      s2_acc   <= '0;
      s2_nf    <= '0;
    end else begin
      s2_valid <= s1_valid && s1_last;
      if (s1_valid) begin
        acc <= acc_next;
        if (s1_last) begin
          s2_acc <= acc_next;
          s2_nf  <= s1_nf;
        end
      end
    end
  end

  // ---- batch normalization: gamma*y + beta ----
  logic signed [63:0] bn_prod, bn_sum;
  always_comb begin
    bn_prod = 64'($signed(gamma[s2_nf])) * 64'($signed(s2_acc));
    bn_sum  = (bn_prod >>> (2 * FRAC)) + 64'($signed(beta[s2_nf]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      res_valid <= s2_valid;
      if (s2_valid) res <= sat_fix(bn_sum);
    end
  end

endmodule
