// init_kernel: parameter-initialization path of the engine.
//
// Before inference the host writes every layer's encoded weights, weight and
// activation codebooks and batch-norm gamma/beta into on-chip memories; after
// that any number of images can be run without reloading. This block takes
// those writes as a stream of cfg_wr_t commands (target layer, memory, PE,
// SIMD lane, address, value), registers each one and raises the write strobe
// of the addressed layer only (one-hot cfg_en), so all layers can share one
// command bus. Commands naming a layer >= NLAYERS are dropped and counted in
// bad_cnt; accepted writes are counted in wr_cnt.
// The host-side transport (AXI, DMA) is outside this block; cmd_ready is
// always high and a write reaches the layer memory two edges after it was
// accepted (one edge here, one in the memory). Command format and counters are
// this design's choices; the source states only what the kernel initializes.
module init_kernel
  import encodeep_pkg::*;
#(
  parameter int unsigned NLAYERS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cmd_valid,
  output logic                cmd_ready,
  input  cfg_wr_t             cmd,
  output logic [NLAYERS-1:0]  cfg_en,
  output cfg_wr_t             cfg,
  output logic [31:0]         wr_cnt,
  output logic [31:0]         bad_cnt
);
  assign cmd_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_en  <= '0;
      cfg     <= '0;
      wr_cnt  <= '0;
      bad_cnt <= '0;
    end else begin
      cfg_en <= '0;
      if (cmd_valid) begin
        cfg <= cmd;
        if (32'(cmd.layer) < NLAYERS) begin
          for (int l = 0; l < NLAYERS; l++) cfg_en[l] <= (32'(cmd.layer) == l);
          wr_cnt            <= wr_cnt + 1;
        end else begin
          bad_cnt <= bad_cnt + 1;
        end
      end
    end
  end

endmodule
