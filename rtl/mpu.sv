// mpu: Max-Pooling Unit working on encoded activations.
//
// Output codebooks are sorted ascending, so a larger code always stands for a
// larger value and the maximum of codes is the code of the maximum. The MPU
// therefore pools the low-bitwidth codes directly: comparators and buffers are
// BITS wide instead of a fixed-point word wide (after the source design).
//
// It pools P x P windows with stride P over a DIM x DIM x CH map that streams
// in raster order, LANES channels per beat (word (y*DIM + x)*CG + g,
// CG = CH/LANES). A row buffer of ODIM*CG words (ODIM = DIM/P) keeps the
// running per-lane maxima of the output row being built; the pooled word is
// emitted with the beat that completes its window, so output order is again
// raster order with LANES channels per beat. Rows and columns beyond ODIM*P are
// read and dropped. The row-buffer organisation and the single output register
// are this design's choices.
// Handshakes: valid/ready on both sides; input is accepted while the output
// register is empty or being emptied.
module mpu #(
  parameter int unsigned CH    = 16,
  parameter int unsigned DIM   = 24,
  parameter int unsigned P     = 2,
  parameter int unsigned LANES = 8,
  parameter int unsigned BITS  = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [LANES*BITS-1:0]    in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [LANES*BITS-1:0]    out_data
);
  localparam int unsigned CG   = CH / LANES;
  localparam int unsigned ODIM = DIM / P;
  localparam int unsigned RBW  = ODIM * CG;
  localparam int unsigned DWW  = $clog2(DIM + 1);
  localparam int unsigned PW   = $clog2(P + 1);
  localparam int unsigned GW   = $clog2(CG + 1);
  localparam int unsigned RAW  = (RBW > 1) ? $clog2(RBW) : 1;

  logic [LANES-1:0][BITS-1:0] rowbuf [RBW];
  logic [LANES-1:0][BITS-1:0] din, prev, m;

  logic [DWW-1:0] x, y, ox, oy;
  logic [PW-1:0]  px, py;
  logic [GW-1:0]  g;
  logic [RAW-1:0] ridx;
  logic           fire, first, emit, in_win;

  assign din      = in_data;
  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;
  assign ridx     = RAW'(32'(ox) * CG + 32'(g));
  assign prev     = rowbuf[ridx];
  assign in_win   = (ox < DWW'(ODIM)) && (oy < DWW'(ODIM));
  assign first    = (px == '0) && (py == '0);
  assign emit     = (px == PW'(P - 1)) && (py == PW'(P - 1));

  always_comb begin
    for (int l = 0; l < LANES; l++)
      m[l] = (first || din[l] > prev[l]) ? din[l] : prev[l];
  end

  always_ff @(posedge clk) begin
    if (fire && in_win && !emit) rowbuf[ridx] <= m;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      x <= '0; y <= '0; ox <= '0; oy <= '0; px <= '0; py <= '0; g <= '0;
    end else begin
      if (fire && in_win && emit) begin
        out_valid <= 1'b1;
        out_data  <= m;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
      if (fire) begin
        if (g != GW'(CG - 1)) g <= g + 1'b1;
        else begin
          g <= '0;
          if (x != DWW'(DIM - 1)) begin
            x <= x + 1'b1;
            if (px == PW'(P - 1)) begin px <= '0; ox <= ox + 1'b1; end
            else px <= px + 1'b1;
          end else begin
            x <= '0; px <= '0; ox <= '0;
            if (y != DWW'(DIM - 1)) begin
              y <= y + 1'b1;
              if (py == PW'(P - 1)) begin py <= '0; oy <= oy + 1'b1; end
              else py <= py + 1'b1;
            end else begin
              y <= '0; py <= '0; oy <= '0;
            end
          end
        end
      end
    end
  end

endmodule
