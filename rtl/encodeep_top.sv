// encodeep_top: the two encoded inference engines side by side.
//
// The source implements one engine per dataset, each built from the same
// blocks (sliding window unit, MVAU with codebook decoders and encoder, max
// pooling on codes, streaming buffers, init kernel): an encoded LeNet for
// MNIST and an encoded VGG7 for CIFAR-10/SVHN. This top holds both, each with
// its own set of ports, prefixed lenet_ and vgg_; they share
// only clk and rst_n and do not interact. On a device either would be built
// alone; placing them together here is this design's choice so that one top
// contains every block. Port meanings and timing are those of encodeep_lenet
// and encodeep_vgg7 (valid/ready streams, cfg_wr_t parameter writes, logits
// as 16-bit fixed point).
module encodeep_top
  import encodeep_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // LeNet engine (MNIST)
  input  logic          lenet_cmd_valid,
  output logic          lenet_cmd_ready,
  input  cfg_wr_t       lenet_cmd,
  input  logic          lenet_in_valid,
  output logic          lenet_in_ready,
  input  logic [7:0]    lenet_in_data,
  output logic          lenet_out_valid,
  input  logic          lenet_out_ready,
  output logic [15:0]   lenet_out_data,
  output logic [3:0]    lenet_evt_stall,
  output logic [31:0]   lenet_init_writes,
  output logic [31:0]   lenet_init_errors,
  // VGG7 engine (CIFAR-10 / SVHN)
  input  logic          vgg_cmd_valid,
  output logic          vgg_cmd_ready,
  input  cfg_wr_t       vgg_cmd,
  input  logic          vgg_in_valid,
  output logic          vgg_in_ready,
  input  logic [23:0]   vgg_in_data,
  output logic          vgg_out_valid,
  input  logic          vgg_out_ready,
  output logic [15:0]   vgg_out_data,
  output logic [8:0]    vgg_evt_stall,
  output logic [31:0]   vgg_init_writes,
  output logic [31:0]   vgg_init_errors
);

  encodeep_lenet u_lenet (
    .clk, .rst_n,
    .cmd_valid(lenet_cmd_valid), .cmd_ready(lenet_cmd_ready), .cmd(lenet_cmd),
    .in_valid(lenet_in_valid), .in_ready(lenet_in_ready), .in_data(lenet_in_data),
    .out_valid(lenet_out_valid), .out_ready(lenet_out_ready), .out_data(lenet_out_data),
    .evt_stall(lenet_evt_stall), .init_writes(lenet_init_writes), .init_errors(lenet_init_errors)
  );

  encodeep_vgg7 u_vgg (
    .clk, .rst_n,
    .cmd_valid(vgg_cmd_valid), .cmd_ready(vgg_cmd_ready), .cmd(vgg_cmd),
    .in_valid(vgg_in_valid), .in_ready(vgg_in_ready), .in_data(vgg_in_data),
    .out_valid(vgg_out_valid), .out_ready(vgg_out_ready), .out_data(vgg_out_data),
    .evt_stall(vgg_evt_stall), .init_writes(vgg_init_writes), .init_errors(vgg_init_errors)
  );

endmodule
