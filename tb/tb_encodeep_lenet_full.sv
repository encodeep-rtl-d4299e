// tb_encodeep_lenet_full: the encoded LeNet engine at its default size
// (28x28 MNIST-shaped input, 16/32 conv channels, 256 hidden, 10 classes,
// LeNet-I bitwidths), two images back to back. net_env builds a random
// network, drives the engine and checks every logit bit-exactly; it also
// reports the load time and the cycles per image.
module tb_encodeep_lenet_full;
  import encodeep_pkg::*;
  localparam int NL = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, cmd_valid, cmd_ready, in_valid, in_ready, out_valid, out_ready, done;
  cfg_wr_t cmd;
  logic [7:0] in_data;
  logic [BFIX-1:0] out_data;
  logic [NL-1:0] evt_stall;
  logic [31:0] init_writes, init_errors;
  int checks, failures;

  encodeep_lenet dut (.*);

  net_env #(.NAME("lenet"), .NL(NL), .IMG(28), .CIN(1), .A0(8), .NIMG(2), .OUT_PE(1),
            .KD('{5, 3, 0, 0, 0, 0, 0, 0, 0}), .POOL('{1, 1, 0, 0, 0, 0, 0, 0, 0}), .MH('{16, 32, 256, 10, 0, 0, 0, 0, 0}), .PE('{8, 2, 8, 1, 0, 0, 0, 0, 0}),
            .WB('{3, 4, 2, 4, 0, 0, 0, 0, 0}), .OB('{2, 2, 3, 1, 0, 0, 0, 0, 0})) env (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .evt_stall, .init_writes, .init_errors,
    .probe_issue({dut.u_fc2.issue, dut.u_fc1.issue, dut.u_conv2.issue, dut.u_conv1.issue}),
    .probe_replay({!dut.u_fc2.need_input, !dut.u_fc1.need_input,
                   !dut.u_conv2.need_input, !dut.u_conv1.need_input}),
    .done, .checks, .failures);

  initial begin
    repeat (40_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
