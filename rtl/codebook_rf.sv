// codebook_rf: codebook decoder, a register file of K = 2**CBITS fixed-point
// cluster centres with NRD combinational read ports.
//
// An encoded value is used directly as the address: rd_data[i] = c[rd_code[i]].
// Holding the codebook in registers rather than an SRAM lets all SIMD lanes
// decode in the same cycle, which is how both the layer input decoder (shared
// by all PEs) and every PE's own weight decoder are built. The table is filled
// through a single write port (wr_en/wr_addr/wr_data) during parameter
// initialization; a write is visible on the read ports from the next cycle.
// Reset clears all entries to zero.
module codebook_rf
  import encodeep_pkg::*;
#(
  parameter int unsigned CBITS = 4,   // bits of an encoded value, K = 2**CBITS
  parameter int unsigned NRD   = 4    // parallel read ports (SIMD lanes)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        wr_en,
  input  logic [CBITS-1:0]            wr_addr,
  input  fix_t                        wr_data,
  input  logic [NRD-1:0][CBITS-1:0]   rd_code,
  output fix_t [NRD-1:0]              rd_data
);
  localparam int unsigned K = 1 << CBITS;

  fix_t cb [K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) cb[i] <= '0;
    end else if (wr_en) begin
      cb[wr_addr] <= wr_data;
    end
  end

  always_comb begin
    for (int i = 0; i < NRD; i++) rd_data[i] = cb[rd_code[i]];
  end

endmodule
