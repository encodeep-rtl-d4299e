// swu: Sliding Window Unit, the input reorder stage of a convolution layer.
//
// A convolution reads, for every output pixel, a KD x KD window of the input
// feature map across all channels. The SWU stores one encoded input frame
// (IFM_DIM x IFM_DIM pixels, IFM_CH channels, BITS per value) and then replays
// it window by window, so that the MVAU behind it sees each window as one
// input vector in SIMD-channel chunks. Because the buffer holds codes rather
// than fixed-point values, its size scales with the layer's encoding bitwidth.
//
// Order (both streams, lane 0 in the low bits):
//   input : pixel rows, then columns, then channel groups of SIMD
//           (word (y*IFM_DIM + x)*CG + g, CG = IFM_CH/SIMD);
//   output: for oy, ox in the OFM_DIM x OFM_DIM output grid, for ky, kx in the
//           window, for each channel group g: the word of pixel
//           (oy*STRIDE+ky, ox*STRIDE+kx), group g. The vector index of an
//           element is therefore (ky*KD + kx)*IFM_CH + channel.
// Two whole-frame banks are used in ping-pong fashion: the next frame is
// written into one bank while the previous one is replayed from the other, so
// the layer in front is not held up while this layer works through its
// windows. Whole-frame banks, no padding ('valid' convolution,
// OFM_DIM = (IFM_DIM-KD)/STRIDE + 1) and the ping-pong scheme are this
// design's choices; the source gives only the reordering function.
// Handshakes: valid/ready on both sides; out_data is stable while out_valid is
// high and out_ready low.
module swu #(
  parameter int unsigned IFM_CH  = 1,
  parameter int unsigned IFM_DIM = 28,
  parameter int unsigned KD      = 5,
  parameter int unsigned STRIDE  = 1,
  parameter int unsigned SIMD    = 1,
  parameter int unsigned BITS    = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [SIMD*BITS-1:0]    in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [SIMD*BITS-1:0]    out_data,
  output logic                    evt_frame    // pulses when a frame has been fully replayed
);
  localparam int unsigned CG      = IFM_CH / SIMD;
  localparam int unsigned OFM_DIM = (IFM_DIM - KD) / STRIDE + 1;
  localparam int unsigned NWORDS  = IFM_DIM * IFM_DIM * CG;
  localparam int unsigned AW      = $clog2(NWORDS + 1);
  localparam int unsigned DW      = $clog2(IFM_DIM + 1);
  localparam int unsigned GW      = $clog2(CG + 1);

  // two frame banks: one is filled while the other is replayed
  logic [SIMD*BITS-1:0] buf_q [2*NWORDS];   // bank b at b*NWORDS
  logic [1:0]    full;
  logic          wsel, rsel;
  logic [AW-1:0] wptr;
  logic [DW-1:0] oy, ox, ky, kx;
  logic [GW-1:0] g;
  logic [AW-1:0] raddr;
  logic          in_fire, out_fire, last_out;

  assign in_ready  = !full[wsel];
  assign out_valid = full[rsel];
  assign in_fire   = in_valid && in_ready;
  assign out_fire  = out_valid && out_ready;
  assign raddr     = AW'((((32'(oy) * STRIDE + 32'(ky)) * IFM_DIM) + 32'(ox) * STRIDE + 32'(kx)) * CG + 32'(g));
  assign out_data  = buf_q[32'(rsel) * NWORDS + 32'(raddr)];
  assign last_out  = (g == GW'(CG - 1)) && (kx == DW'(KD - 1)) && (ky == DW'(KD - 1)) &&
                     (ox == DW'(OFM_DIM - 1)) && (oy == DW'(OFM_DIM - 1));

  always_ff @(posedge clk) begin
    if (in_fire) buf_q[32'(wsel) * NWORDS + 32'(wptr)] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= '0;
      wsel      <= 1'b0;
      rsel      <= 1'b0;
      wptr      <= '0;
      oy        <= '0;
      ox        <= '0;
      ky        <= '0;
      kx        <= '0;
      g         <= '0;
      evt_frame <= 1'b0;
    end else begin
      evt_frame <= 1'b0;
      // writer side
      if (in_fire) begin
        if (wptr == AW'(NWORDS - 1)) begin
          wptr       <= '0;
          full[wsel] <= 1'b1;
          wsel       <= !wsel;
        end else begin
          wptr <= wptr + 1'b1;
        end
      end
      // reader side
      if (out_fire) begin
        if (g != GW'(CG - 1)) g <= g + 1'b1;
        else begin
          g <= '0;
          if (kx != DW'(KD - 1)) kx <= kx + 1'b1;
          else begin
            kx <= '0;
            if (ky != DW'(KD - 1)) ky <= ky + 1'b1;
            else begin
              ky <= '0;
              if (ox != DW'(OFM_DIM - 1)) ox <= ox + 1'b1;
              else begin
                ox <= '0;
                if (oy != DW'(OFM_DIM - 1)) oy <= oy + 1'b1;
                else oy <= '0;
              end
            end
          end
        end
        if (last_out) begin
          full[rsel] <= 1'b0;   // writer never sets the bank being read
          rsel       <= !rsel;
          evt_frame  <= 1'b1;
        end
      end
    end
  end

endmodule
