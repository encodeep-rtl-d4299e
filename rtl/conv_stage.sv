// conv_stage: one encoded convolution layer of a streaming engine, optionally
// followed by 2x2 max pooling.
//
// Chain: swu (KD x KD windows, stride 1, 'valid') -> mvau (decode, SIMD x PE
// MACs, batch norm, encode) -> stream_fifo, and when POOL = 1 also
// mpu (2x2, stride 2 on codes) -> stream_fifo. The input is an encoded
// feature map streamed in raster order, SIMD channel codes of IBITS per beat
// (channel-group-major inside a pixel); the output is PE channel codes of
// OBITS per beat in the same order. Parameter writes reach the MVAU through
// cfg_en/cfg (see init_kernel). evt_stall pulses while the MVAU holds a fold
// back for its encoder or a full output.
//
// The source draws networks as such CONV(-POOL) layers joined by streaming
// buffers; bundling them in one module, the FIFO depth and the 'valid'
// convolution are this design's choices. CH must be a multiple of SIMD and
// MH of PE.
module conv_stage
  import encodeep_pkg::*;
#(
  parameter int unsigned CH     = 32,   // input channels
  parameter int unsigned DIM    = 30,   // input map height = width
  parameter int unsigned KD     = 3,    // kernel size
  parameter int unsigned MH     = 32,   // output channels
  parameter int unsigned SIMD   = 4,
  parameter int unsigned PE     = 8,
  parameter int unsigned IBITS  = 4,
  parameter int unsigned WBITS  = 4,
  parameter int unsigned OBITS  = 3,
  parameter bit          POOL   = 1'b1,
  parameter int unsigned FIFO_D = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_en,
  input  cfg_wr_t                cfg,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [SIMD*IBITS-1:0]  in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [PE*OBITS-1:0]    out_data,
  output logic                   evt_stall
);
  localparam int unsigned ODIM = DIM - KD + 1;

  logic                  w_v, w_r;
  logic [SIMD*IBITS-1:0] w_d;
  swu #(.IFM_CH(CH), .IFM_DIM(DIM), .KD(KD), .STRIDE(1), .SIMD(SIMD), .BITS(IBITS)) u_swu (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(w_v), .out_ready(w_r), .out_data(w_d), .evt_frame()
  );

  logic                c_v, c_r;
  logic [PE*OBITS-1:0] c_d;
  mvau #(.MW(KD*KD*CH), .MH(MH), .SIMD(SIMD), .PE(PE), .IBITS(IBITS), .WBITS(WBITS),
         .OBITS(OBITS), .ENCODE_OUT(1'b1)) u_mvau (
    .clk, .rst_n, .cfg_en, .cfg,
    .in_valid(w_v), .in_ready(w_r), .in_data(w_d),
    .out_valid(c_v), .out_ready(c_r), .out_data(c_d), .evt_stall
  );

  generate
    if (POOL) begin : g_pool
      logic                f_v, f_r, p_v, p_r;
      logic [PE*OBITS-1:0] f_d, p_d;
      stream_fifo #(.W(PE*OBITS), .DEPTH(FIFO_D)) u_buf_a (
        .clk, .rst_n, .in_valid(c_v), .in_ready(c_r), .in_data(c_d),
        .out_valid(f_v), .out_ready(f_r), .out_data(f_d), .level()
      );
      mpu #(.CH(MH), .DIM(ODIM), .P(2), .LANES(PE), .BITS(OBITS)) u_pool (
        .clk, .rst_n, .in_valid(f_v), .in_ready(f_r), .in_data(f_d),
        .out_valid(p_v), .out_ready(p_r), .out_data(p_d)
      );
      stream_fifo #(.W(PE*OBITS), .DEPTH(FIFO_D)) u_buf_b (
        .clk, .rst_n, .in_valid(p_v), .in_ready(p_r), .in_data(p_d),
        .out_valid, .out_ready, .out_data, .level()
      );
    end else begin : g_nopool
      stream_fifo #(.W(PE*OBITS), .DEPTH(FIFO_D)) u_buf_a (
        .clk, .rst_n, .in_valid(c_v), .in_ready(c_r), .in_data(c_d),
        .out_valid, .out_ready, .out_data, .level()
      );
    end
  endgenerate

endmodule
