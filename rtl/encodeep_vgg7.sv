// encodeep_vgg7: streaming inference engine for an encoded VGG7 (CIFAR-10 /
// SVHN, 32x32 RGB images).
//
// Same architecture as the LeNet engine: one compute engine per layer, all
// feature maps kept on chip as few-bit codes of per-layer codebooks, weights
// stored as codes and decoded per PE. Default network:
//
//   image 32x32x3, 8-bit codes per channel (one pixel = 3 codes per beat)
//   conv1   3->32  3x3  30x30   (W 4, out A 4)
//   conv2  32->32  3x3  28x28   (W 4, out A 3)  + 2x2 max pool -> 14x14
//   conv3  32->64  3x3  12x12   (W 4, out A 3)
//   conv4  64->64  3x3  10x10   (W 4, out A 4)  + 2x2 max pool -> 5x5
//   conv5  64->128 3x3  3x3     (W 4, out A 4)
//   conv6 128->128 3x3  1x1     (W 3, out A 3)
//   fc1   128->256              (W 4, out A 3)
//   fc2   256->256              (W 3, out A 4)
//   fc3   256->10               (W 3, 16-bit fixed-point logits)
//
// Layer shapes follow the source's VGG7 (two 3x3 CONV layers per width 32, 64,
// 128, 2x2 stride-2 pooling after the first two pairs, two 256-neuron FC
// layers, a 10-neuron classifier) and the bitwidths of its 'VGG7-I'
// configuration. 'Valid' convolutions (which make the last map 1x1), the
// pixel coding and the PE counts are this design's choices; softmax is left
// to the host. The SIMD width of each layer
// is the PE count of the layer before it (CIN for conv1), so the beats of
// neighbouring engines match. The PE counts (114 multipliers in all) give
// conv2 and conv4 about 230 k cycles per image, the largest of any layer.
//
// Interfaces: cmd_* parameter writes (cfg_wr_t, layer 0..8 = conv1..fc3);
// in_* one pixel (CIN codes) per beat in raster order; out_* PE9 logits per
// beat; evt_stall[l] per MVAU; init_writes/init_errors as in the LeNet engine.
module encodeep_vgg7
  import encodeep_pkg::*;
#(
  parameter int unsigned IMG    = 32,
  parameter int unsigned CIN    = 3,
  parameter int unsigned C1     = 32,
  parameter int unsigned C2     = 64,
  parameter int unsigned C3     = 128,
  parameter int unsigned F1     = 256,
  parameter int unsigned NCLASS = 10,
  parameter int unsigned A0 = 8,
  parameter int unsigned A1 = 4, parameter int unsigned A2 = 3, parameter int unsigned A3 = 3,
  parameter int unsigned A4 = 4, parameter int unsigned A5 = 4, parameter int unsigned A6 = 3,
  parameter int unsigned A7 = 3, parameter int unsigned A8 = 4,
  parameter int unsigned W1 = 4, parameter int unsigned W2 = 4, parameter int unsigned W3 = 4,
  parameter int unsigned W4 = 4, parameter int unsigned W5 = 4, parameter int unsigned W6 = 3,
  parameter int unsigned W7 = 4, parameter int unsigned W8 = 3, parameter int unsigned W9 = 3,
  parameter int unsigned PE1 = 4, parameter int unsigned PE2 = 8, parameter int unsigned PE3 = 4,
  parameter int unsigned PE4 = 4, parameter int unsigned PE5 = 2, parameter int unsigned PE6 = 2,
  parameter int unsigned PE7 = 2, parameter int unsigned PE8 = 2, parameter int unsigned PE9 = 1,
  parameter int unsigned FIFO_D = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  cfg_wr_t               cmd,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [CIN*A0-1:0]     in_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [PE9*BFIX-1:0]   out_data,
  output logic [8:0]            evt_stall,
  output logic [31:0]           init_writes,
  output logic [31:0]           init_errors
);
  localparam int unsigned D1 = IMG - 2;     // conv1 output
  localparam int unsigned D2 = D1 - 2;      // conv2 output, pooled to D2/2
  localparam int unsigned D3 = D2 / 2 - 2;  // conv3 output
  localparam int unsigned D4 = D3 - 2;      // conv4 output, pooled to D4/2
  localparam int unsigned D5 = D4 / 2 - 2;  // conv5 output
  localparam int unsigned D6 = D5 - 2;      // conv6 output
  localparam int unsigned FIN = D6 * D6 * C3;

  logic [8:0] cfg_en;
  cfg_wr_t    cfg;
  init_kernel #(.NLAYERS(9)) u_init (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd,
    .cfg_en, .cfg, .wr_cnt(init_writes), .bad_cnt(init_errors)
  );

  logic               v1, r1;  logic [PE1*A1-1:0] d1;
  logic               v2, r2;  logic [PE2*A2-1:0] d2;
  logic               v3, r3;  logic [PE3*A3-1:0] d3;
  logic               v4, r4;  logic [PE4*A4-1:0] d4;
  logic               v5, r5;  logic [PE5*A5-1:0] d5;
  logic               v6, r6;  logic [PE6*A6-1:0] d6;
  logic               v7, r7;  logic [PE7*A7-1:0] d7;
  logic               v8, r8;  logic [PE8*A8-1:0] d8;

  conv_stage #(.CH(CIN), .DIM(IMG), .KD(3), .MH(C1), .SIMD(CIN), .PE(PE1), .IBITS(A0),
               .WBITS(W1), .OBITS(A1), .POOL(1'b0), .FIFO_D(FIFO_D)) u_c1 (
    .clk, .rst_n, .cfg_en(cfg_en[0]), .cfg, .in_valid, .in_ready, .in_data,
    .out_valid(v1), .out_ready(r1), .out_data(d1), .evt_stall(evt_stall[0]));

  conv_stage #(.CH(C1), .DIM(D1), .KD(3), .MH(C1), .SIMD(PE1), .PE(PE2), .IBITS(A1),
               .WBITS(W2), .OBITS(A2), .POOL(1'b1), .FIFO_D(FIFO_D)) u_c2 (
    .clk, .rst_n, .cfg_en(cfg_en[1]), .cfg, .in_valid(v1), .in_ready(r1), .in_data(d1),
    .out_valid(v2), .out_ready(r2), .out_data(d2), .evt_stall(evt_stall[1]));

  conv_stage #(.CH(C1), .DIM(D2/2), .KD(3), .MH(C2), .SIMD(PE2), .PE(PE3), .IBITS(A2),
               .WBITS(W3), .OBITS(A3), .POOL(1'b0), .FIFO_D(FIFO_D)) u_c3 (
    .clk, .rst_n, .cfg_en(cfg_en[2]), .cfg, .in_valid(v2), .in_ready(r2), .in_data(d2),
    .out_valid(v3), .out_ready(r3), .out_data(d3), .evt_stall(evt_stall[2]));

  conv_stage #(.CH(C2), .DIM(D3), .KD(3), .MH(C2), .SIMD(PE3), .PE(PE4), .IBITS(A3),
               .WBITS(W4), .OBITS(A4), .POOL(1'b1), .FIFO_D(FIFO_D)) u_c4 (
    .clk, .rst_n, .cfg_en(cfg_en[3]), .cfg, .in_valid(v3), .in_ready(r3), .in_data(d3),
    .out_valid(v4), .out_ready(r4), .out_data(d4), .evt_stall(evt_stall[3]));

  conv_stage #(.CH(C2), .DIM(D4/2), .KD(3), .MH(C3), .SIMD(PE4), .PE(PE5), .IBITS(A4),
               .WBITS(W5), .OBITS(A5), .POOL(1'b0), .FIFO_D(FIFO_D)) u_c5 (
    .clk, .rst_n, .cfg_en(cfg_en[4]), .cfg, .in_valid(v4), .in_ready(r4), .in_data(d4),
    .out_valid(v5), .out_ready(r5), .out_data(d5), .evt_stall(evt_stall[4]));

  conv_stage #(.CH(C3), .DIM(D5), .KD(3), .MH(C3), .SIMD(PE5), .PE(PE6), .IBITS(A5),
               .WBITS(W6), .OBITS(A6), .POOL(1'b0), .FIFO_D(FIFO_D)) u_c6 (
    .clk, .rst_n, .cfg_en(cfg_en[5]), .cfg, .in_valid(v5), .in_ready(r5), .in_data(d5),
    .out_valid(v6), .out_ready(r6), .out_data(d6), .evt_stall(evt_stall[5]));

  // ---- fully connected layers; fc1 input is the last map flattened (y, x, channel) ----
  logic               m7_v, m7_r;  logic [PE7*A7-1:0] m7_d;
  mvau #(.MW(FIN), .MH(F1), .SIMD(PE6), .PE(PE7), .IBITS(A6), .WBITS(W7), .OBITS(A7),
         .ENCODE_OUT(1'b1)) u_fc1 (
    .clk, .rst_n, .cfg_en(cfg_en[6]), .cfg, .in_valid(v6), .in_ready(r6), .in_data(d6),
    .out_valid(m7_v), .out_ready(m7_r), .out_data(m7_d), .evt_stall(evt_stall[6]));
  stream_fifo #(.W(PE7*A7), .DEPTH(FIFO_D)) u_buf7 (
    .clk, .rst_n, .in_valid(m7_v), .in_ready(m7_r), .in_data(m7_d),
    .out_valid(v7), .out_ready(r7), .out_data(d7), .level());

  logic               m8_v, m8_r;  logic [PE8*A8-1:0] m8_d;
  mvau #(.MW(F1), .MH(F1), .SIMD(PE7), .PE(PE8), .IBITS(A7), .WBITS(W8), .OBITS(A8),
         .ENCODE_OUT(1'b1)) u_fc2 (
    .clk, .rst_n, .cfg_en(cfg_en[7]), .cfg, .in_valid(v7), .in_ready(r7), .in_data(d7),
    .out_valid(m8_v), .out_ready(m8_r), .out_data(m8_d), .evt_stall(evt_stall[7]));
  stream_fifo #(.W(PE8*A8), .DEPTH(FIFO_D)) u_buf8 (
    .clk, .rst_n, .in_valid(m8_v), .in_ready(m8_r), .in_data(m8_d),
    .out_valid(v8), .out_ready(r8), .out_data(d8), .level());

  mvau #(.MW(F1), .MH(NCLASS), .SIMD(PE8), .PE(PE9), .IBITS(A8), .WBITS(W9), .OBITS(1),
         .ENCODE_OUT(1'b0)) u_fc3 (
    .clk, .rst_n, .cfg_en(cfg_en[8]), .cfg, .in_valid(v8), .in_ready(r8), .in_data(d8),
    .out_valid, .out_ready, .out_data, .evt_stall(evt_stall[8]));

endmodule
