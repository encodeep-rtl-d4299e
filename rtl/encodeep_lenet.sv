// encodeep_lenet: streaming inference engine for an encoded LeNet on MNIST.
//
// Every layer has its own compute engine, and all intermediate feature maps
// stay on chip: each layer encodes its outputs into a few-bit index into a
// per-layer codebook, and only these codes travel through the streaming
// buffers to the next layer, which decodes them back to fixed point before
// multiplying. Weights are likewise stored as codes and decoded per PE.
// The network (default parameters) is
//
//   image 28x28x1, 8-bit pixel codes
//   SWU 5x5  -> MVAU conv1  1->16   (W 3 bit, out A 2 bit) -> FIFO
//   MPU 2x2  -> FIFO
//   SWU 3x3  -> MVAU conv2 16->32   (W 4 bit, out A 2 bit) -> FIFO
//   MPU 2x2  -> FIFO
//   MVAU fc1 800->256               (W 2 bit, out A 3 bit) -> FIFO
//   MVAU fc2 256->10                (W 4 bit, out 16-bit fixed-point logits)
//
// Layer shapes are the LeNet of the source's benchmark table and the per-layer
// bitwidths its 'LeNet-I' configuration; the input pixel coding (8-bit codes
// with a host-loaded 256-entry codebook), 'valid' convolutions, the SIMD/PE
// factors and the FIFO depth are this design's choices. SIMD/PE were chosen so
// that neighbouring engines agree on beat widths (PE of a layer = SIMD of the
// next) and conv1, conv2 and fc1 each need 25-29 k cycles per image.
// Softmax is left to the host, which receives the logits.
//
// Interfaces:
//   cmd_*  parameter writes (cfg_wr_t; layer 0..3 = conv1, conv2, fc1, fc2),
//          issued before inference through the init_kernel;
//   in_*   image stream, one 8-bit pixel code per beat, raster order;
//   out_*  logits, FC2_PE fixed-point words per beat (class 0 first);
//   evt_stall[l] pulses while MVAU l holds a fold back for its encoder/output;
//   init_writes/init_errors count accepted and misaddressed parameter writes.
// All streams use valid/ready. Successive images overlap in the pipeline.
module encodeep_lenet
  import encodeep_pkg::*;
#(
  parameter int unsigned IMG      = 28,
  parameter int unsigned C1       = 16,
  parameter int unsigned K1       = 5,
  parameter int unsigned C2       = 32,
  parameter int unsigned K2       = 3,
  parameter int unsigned F1       = 256,
  parameter int unsigned NCLASS   = 10,
  parameter int unsigned A0       = 8,    // input pixel code bits
  parameter int unsigned A1       = 2,    // conv1 output code bits
  parameter int unsigned A2       = 2,    // conv2 output code bits
  parameter int unsigned A3       = 3,    // fc1 output code bits
  parameter int unsigned W1       = 3,    // conv1 weight code bits
  parameter int unsigned W2       = 4,    // conv2 weight code bits
  parameter int unsigned W3       = 2,    // fc1 weight code bits
  parameter int unsigned W4       = 4,    // fc2 weight code bits
  parameter int unsigned PE1      = 8,
  parameter int unsigned SIMD2    = 8,    // must equal PE1
  parameter int unsigned PE2      = 2,
  parameter int unsigned SIMD3    = 2,    // must equal PE2
  parameter int unsigned PE3      = 8,
  parameter int unsigned SIMD4    = 8,    // must equal PE3
  parameter int unsigned PE4      = 1,
  parameter int unsigned FIFO_D   = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  cfg_wr_t                 cmd,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [A0-1:0]           in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [PE4*BFIX-1:0]     out_data,
  output logic [3:0]              evt_stall,
  output logic [31:0]             init_writes,   // parameter writes accepted
  output logic [31:0]             init_errors    // writes to a non-existent layer
);
  localparam int unsigned D1   = IMG - K1 + 1;     // conv1 output size
  localparam int unsigned Q1   = D1 / 2;           // after pool1
  localparam int unsigned D2   = Q1 - K2 + 1;      // conv2 output size
  localparam int unsigned Q2   = D2 / 2;           // after pool2
  localparam int unsigned FIN  = Q2 * Q2 * C2;     // fc1 input length

  // ---- parameter initialization ----
  logic [3:0] cfg_en;
  cfg_wr_t    cfg;
  init_kernel #(.NLAYERS(4)) u_init (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd,
    .cfg_en, .cfg, .wr_cnt(init_writes), .bad_cnt(init_errors)
  );

  // ---- conv1 ----
  logic            s0_v, s0_r;
  logic [A0-1:0]   s0_d;
  swu #(.IFM_CH(1), .IFM_DIM(IMG), .KD(K1), .STRIDE(1), .SIMD(1), .BITS(A0)) u_swu1 (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(s0_v), .out_ready(s0_r), .out_data(s0_d), .evt_frame()
  );

  logic               c1_v, c1_r;
  logic [PE1*A1-1:0]  c1_d;
  mvau #(.MW(K1*K1), .MH(C1), .SIMD(1), .PE(PE1), .IBITS(A0), .WBITS(W1), .OBITS(A1),
         .ENCODE_OUT(1'b1)) u_conv1 (
    .clk, .rst_n, .cfg_en(cfg_en[0]), .cfg,
    .in_valid(s0_v), .in_ready(s0_r), .in_data(s0_d),
    .out_valid(c1_v), .out_ready(c1_r), .out_data(c1_d), .evt_stall(evt_stall[0])
  );

  logic               f1_v, f1_r;
  logic [PE1*A1-1:0]  f1_d;
  stream_fifo #(.W(PE1*A1), .DEPTH(FIFO_D)) u_buf1 (
    .clk, .rst_n, .in_valid(c1_v), .in_ready(c1_r), .in_data(c1_d),
    .out_valid(f1_v), .out_ready(f1_r), .out_data(f1_d), .level()
  );

  logic               p1_v, p1_r;
  logic [PE1*A1-1:0]  p1_d;
  mpu #(.CH(C1), .DIM(D1), .P(2), .LANES(PE1), .BITS(A1)) u_pool1 (
    .clk, .rst_n, .in_valid(f1_v), .in_ready(f1_r), .in_data(f1_d),
    .out_valid(p1_v), .out_ready(p1_r), .out_data(p1_d)
  );

  logic               f2_v, f2_r;
  logic [PE1*A1-1:0]  f2_d;
  stream_fifo #(.W(PE1*A1), .DEPTH(FIFO_D)) u_buf2 (
    .clk, .rst_n, .in_valid(p1_v), .in_ready(p1_r), .in_data(p1_d),
    .out_valid(f2_v), .out_ready(f2_r), .out_data(f2_d), .level()
  );

  // ---- conv2 ----
  logic                s2_v, s2_r;
  logic [SIMD2*A1-1:0] s2_d;
  swu #(.IFM_CH(C1), .IFM_DIM(Q1), .KD(K2), .STRIDE(1), .SIMD(SIMD2), .BITS(A1)) u_swu2 (
    .clk, .rst_n, .in_valid(f2_v), .in_ready(f2_r), .in_data(f2_d),
    .out_valid(s2_v), .out_ready(s2_r), .out_data(s2_d), .evt_frame()
  );

  logic               c2_v, c2_r;
  logic [PE2*A2-1:0]  c2_d;
  mvau #(.MW(K2*K2*C1), .MH(C2), .SIMD(SIMD2), .PE(PE2), .IBITS(A1), .WBITS(W2), .OBITS(A2),
         .ENCODE_OUT(1'b1)) u_conv2 (
    .clk, .rst_n, .cfg_en(cfg_en[1]), .cfg,
    .in_valid(s2_v), .in_ready(s2_r), .in_data(s2_d),
    .out_valid(c2_v), .out_ready(c2_r), .out_data(c2_d), .evt_stall(evt_stall[1])
  );

  logic               f3_v, f3_r;
  logic [PE2*A2-1:0]  f3_d;
  stream_fifo #(.W(PE2*A2), .DEPTH(FIFO_D)) u_buf3 (
    .clk, .rst_n, .in_valid(c2_v), .in_ready(c2_r), .in_data(c2_d),
    .out_valid(f3_v), .out_ready(f3_r), .out_data(f3_d), .level()
  );

  logic               p2_v, p2_r;
  logic [PE2*A2-1:0]  p2_d;
  mpu #(.CH(C2), .DIM(D2), .P(2), .LANES(PE2), .BITS(A2)) u_pool2 (
    .clk, .rst_n, .in_valid(f3_v), .in_ready(f3_r), .in_data(f3_d),
    .out_valid(p2_v), .out_ready(p2_r), .out_data(p2_d)
  );

  logic               f4_v, f4_r;
  logic [PE2*A2-1:0]  f4_d;
  stream_fifo #(.W(PE2*A2), .DEPTH(FIFO_D)) u_buf4 (
    .clk, .rst_n, .in_valid(p2_v), .in_ready(p2_r), .in_data(p2_d),
    .out_valid(f4_v), .out_ready(f4_r), .out_data(f4_d), .level()
  );

  // ---- fc1 (input = pooled map flattened as (y, x, channel)) ----
  logic               c3_v, c3_r;
  logic [PE3*A3-1:0]  c3_d;
  mvau #(.MW(FIN), .MH(F1), .SIMD(SIMD3), .PE(PE3), .IBITS(A2), .WBITS(W3), .OBITS(A3),
         .ENCODE_OUT(1'b1)) u_fc1 (
    .clk, .rst_n, .cfg_en(cfg_en[2]), .cfg,
    .in_valid(f4_v), .in_ready(f4_r), .in_data(f4_d),
    .out_valid(c3_v), .out_ready(c3_r), .out_data(c3_d), .evt_stall(evt_stall[2])
  );

  logic               f5_v, f5_r;
  logic [PE3*A3-1:0]  f5_d;
  stream_fifo #(.W(PE3*A3), .DEPTH(FIFO_D)) u_buf5 (
    .clk, .rst_n, .in_valid(c3_v), .in_ready(c3_r), .in_data(c3_d),
    .out_valid(f5_v), .out_ready(f5_r), .out_data(f5_d), .level()
  );

  // ---- fc2, raw fixed-point logits ----
  mvau #(.MW(F1), .MH(NCLASS), .SIMD(SIMD4), .PE(PE4), .IBITS(A3), .WBITS(W4), .OBITS(1),
         .ENCODE_OUT(1'b0)) u_fc2 (
    .clk, .rst_n, .cfg_en(cfg_en[3]), .cfg,
    .in_valid(f5_v), .in_ready(f5_r), .in_data(f5_d),
    .out_valid, .out_ready, .out_data, .evt_stall(evt_stall[3])
  );

  // Beat widths of neighbouring engines must agree.
  initial begin
    assert (SIMD2 == PE1 && SIMD3 == PE2 && SIMD4 == PE3)
      else $error("encodeep_lenet: SIMD of a layer must equal PE of the previous one");
  end

endmodule
