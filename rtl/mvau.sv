// mvau: Matrix-Vector-Activation Unit, the compute engine of one CONV or FC
// layer.
//
// It multiplies each MW-element input vector by the layer's MH x MW weight
// matrix, batch-normalizes every result and encodes it for the next layer.
// Work is spread over PE processing engines (neuron n goes to PE n % PE, fold
// n / PE) each with SIMD multiply lanes, so one input vector takes
// NF = MH/PE folds of SF = MW/SIMD beats. Structure after the source design:
//   * inputs arrive as encoded values, SIMD per beat; one input decoder
//     (codebook register file, K = 2**IBITS) turns them into fixed point, and
//     the decoded word is registered once and shared by all PEs;
//   * the encoded input vector is kept in a small buffer of SF words and
//     replayed for folds 1..NF-1 (kept encoded to save storage);
//   * a controller steps (fold, beat), generates the weight SRAM address
//     nf*SF+sf and the accumulator clear/last flags;
//   * the PE results (one fold = PE neurons) go through the output encoder
//     (act_encoder, K = 2**OBITS, linear search) and leave as PE codes.
// With ENCODE_OUT = 0 (last layer) the batch-normalized fixed-point values
// are output instead of codes (the logits returned to the host).
//
// Streams: in_data = SIMD codes (lane 0 in the low bits) with in_valid/in_ready;
// out_data = PE codes or PE fixed-point words (lane 0 low) with
// out_valid/out_ready. Flow control is this design's: a fold's last beat is
// issued only when no earlier fold result is still being encoded or waiting
// at the output, so at most one result is in flight; beats that do not end a
// fold keep issuing meanwhile, overlapping encoding with the dot products.
// evt_stall pulses for each cycle a last beat is held back this way.
// Latency: fold result leaves K+4 cycles (encoded) or 4 cycles (raw) after its
// last beat was issued. Parameters are written through cfg_en/cfg.
module mvau
  import encodeep_pkg::*;
#(
  parameter int unsigned MW         = 16,  // input vector length
  parameter int unsigned MH         = 8,   // output neurons / channels
  parameter int unsigned SIMD       = 4,
  parameter int unsigned PE         = 2,
  parameter int unsigned IBITS      = 2,   // input code bits
  parameter int unsigned WBITS      = 3,   // weight code bits
  parameter int unsigned OBITS      = 2,   // output code bits
  parameter bit          ENCODE_OUT = 1'b1,
  localparam int unsigned OUT_W     = ENCODE_OUT ? PE * OBITS : PE * BFIX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_en,
  input  cfg_wr_t                 cfg,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [SIMD*IBITS-1:0]   in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [OUT_W-1:0]        out_data,
  output logic                    evt_stall
);
  localparam int unsigned SF  = MW / SIMD;
  localparam int unsigned NF  = MH / PE;
  localparam int unsigned AW  = $clog2(NF * SF);
  localparam int unsigned NFW = (NF > 1) ? $clog2(NF) : 1;
  localparam int unsigned SFW = (SF > 1) ? $clog2(SF) : 1;

  // ---- controller ----
  logic [SFW-1:0] sf;
  logic [NFW-1:0] nf;
  logic [AW-1:0]  waddr;
  logic           busy_out;
  logic           need_input, have_data, is_last, out_ok, issue;
  logic           out_fire;

  logic [SIMD*IBITS-1:0] ibuf [SF];
  logic [SIMD-1:0][IBITS-1:0] word;

  assign need_input = (nf == '0);
  assign have_data  = need_input ? in_valid : 1'b1;
  assign is_last    = (sf == SFW'(SF - 1));
  assign out_ok     = !is_last || !busy_out;
  assign issue      = have_data && out_ok;
  assign in_ready   = need_input && out_ok;
  assign word       = need_input ? in_data : ibuf[sf];
  assign evt_stall  = have_data && !out_ok;
  assign out_fire   = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (issue && need_input) ibuf[sf] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sf       <= '0;
      nf       <= '0;
      waddr    <= '0;
      busy_out <= 1'b0;
    end else begin
      if (issue) begin
        if (is_last) begin
          sf <= '0;
          if (nf == NFW'(NF - 1)) begin
            nf    <= '0;
            waddr <= '0;
          end else begin
            nf    <= nf + 1'b1;
            waddr <= waddr + 1'b1;
          end
        end else begin
          sf    <= sf + 1'b1;
          waddr <= waddr + 1'b1;
        end
      end
      if (issue && is_last) busy_out <= 1'b1;
      else if (out_fire)    busy_out <= 1'b0;
    end
  end

  // ---- input decoder, shared by all PEs ----
  fix_t [SIMD-1:0] x_comb, x_dec;
  codebook_rf #(.CBITS(IBITS), .NRD(SIMD)) u_icb (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (cfg_en && cfg.tgt == TGT_ICB),
    .wr_addr (cfg.addr[IBITS-1:0]),
    .wr_data (fix_t'(cfg.data)),
    .rd_code (word),
    .rd_data (x_comb)
  );

  logic           s1_valid, s1_clr, s1_last;
  logic [NFW-1:0] s1_nf;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_clr   <= 1'b0;
      s1_last  <= 1'b0;
      s1_nf    <= '0;
      x_dec    <= '0;
    end else begin
      s1_valid <= issue;
      if (issue) begin
        s1_clr  <= (sf == '0);
        s1_last <= is_last;
        s1_nf   <= nf;
        x_dec   <= x_comb;
      end
    end
  end

  // ---- PE array ----
  logic [PE-1:0] res_valid;
  logic          res_valid_all;
  assign res_valid_all = &res_valid;  // all PEs run in lockstep
  fix_t [PE-1:0] res;
  for (genvar p = 0; p < PE; p++) begin : g_pe
    pe #(.SIMD(SIMD), .WBITS(WBITS), .NF(NF), .SF(SF)) u_pe (
      .clk       (clk),
      .rst_n     (rst_n),
      .cfg_en    (cfg_en && cfg.pe == 8'(p)),
      .cfg       (cfg),
      .rd_en     (issue),
      .rd_addr   (waddr),
      .s1_valid  (s1_valid),
      .s1_clr    (s1_clr),
      .s1_last   (s1_last),
      .s1_nf     (s1_nf),
      .x_dec     (x_dec),
      .res_valid (res_valid[p]),
      .res       (res[p])
    );
  end

  // ---- output: encoder or raw fixed point ----
  if (ENCODE_OUT) begin : g_enc
    logic enc_in_ready;
    logic [PE-1:0][OBITS-1:0] codes;
    act_encoder #(.CBITS(OBITS), .LANES(PE)) u_enc (
      .clk       (clk),
      .rst_n     (rst_n),
      .wr_en     (cfg_en && cfg.tgt == TGT_OCB),
      .wr_addr   (cfg.addr[OBITS-1:0]),
      .wr_data   (fix_t'(cfg.data)),
      .in_valid  (res_valid_all),
      .in_ready  (enc_in_ready),
      .in_y      (res),
      .out_valid (out_valid),
      .out_ready (out_ready),
      .out_code  (codes)
    );
    assign out_data = codes;
    a_enc_free: assert property (@(posedge clk) disable iff (!rst_n) res_valid_all |-> enc_in_ready);
  end else begin : g_raw
    fix_t [PE-1:0] res_q;
    logic          res_v;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        res_v <= 1'b0;
        res_q <= '0;
      end else begin
        if (res_valid_all) begin
          res_v <= 1'b1;
          res_q <= res;
        end else if (out_ready) begin
          res_v <= 1'b0;
        end
      end
    end
    assign out_valid = res_v;
    assign out_data  = res_q;
  end

  a_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> out_valid);

endmodule
