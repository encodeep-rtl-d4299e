// tb_encodeep_top_lowbit: the default top running lower-bitwidth
// configurations of the same networks without any hardware change: LeNet-II
// (weight bits 3, 2, 1, 3) on the LeNet engine and VGG7-II (weight bits
// 4, 4, 4, 3, 3, 2, 2, 2, 3) on the VGG7 engine (two and one images). A layer whose
// weights or activations need fewer bits than were built uses only the first
// 2^b entries of its codebooks: the unused entries stay at their reset value
// 0, and because the encoder keeps the lower index on a tie they are never
// chosen over c[0] = 0. Loading and checking are done by net_env, as in the
// full-size test.
module tb_encodeep_top_lowbit;
  import encodeep_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, rst_n_v;
  logic l_cmd_valid, l_cmd_ready, l_in_valid, l_in_ready, l_out_valid, l_out_ready, l_done;
  logic v_cmd_valid, v_cmd_ready, v_in_valid, v_in_ready, v_out_valid, v_out_ready, v_done;
  cfg_wr_t l_cmd, v_cmd;
  logic [7:0]  l_in_data;
  logic [23:0] v_in_data;
  logic [15:0] l_out_data, v_out_data;
  logic [3:0]  l_evt_stall;
  logic [8:0]  v_evt_stall;
  logic [31:0] l_init_writes, l_init_errors, v_init_writes, v_init_errors;
  int l_checks, l_failures, v_checks, v_failures;

  encodeep_top dut (
    .clk, .rst_n,
    .lenet_cmd_valid(l_cmd_valid), .lenet_cmd_ready(l_cmd_ready), .lenet_cmd(l_cmd),
    .lenet_in_valid(l_in_valid), .lenet_in_ready(l_in_ready), .lenet_in_data(l_in_data),
    .lenet_out_valid(l_out_valid), .lenet_out_ready(l_out_ready), .lenet_out_data(l_out_data),
    .lenet_evt_stall(l_evt_stall), .lenet_init_writes(l_init_writes),
    .lenet_init_errors(l_init_errors),
    .vgg_cmd_valid(v_cmd_valid), .vgg_cmd_ready(v_cmd_ready), .vgg_cmd(v_cmd),
    .vgg_in_valid(v_in_valid), .vgg_in_ready(v_in_ready), .vgg_in_data(v_in_data),
    .vgg_out_valid(v_out_valid), .vgg_out_ready(v_out_ready), .vgg_out_data(v_out_data),
    .vgg_evt_stall(v_evt_stall), .vgg_init_writes(v_init_writes), .vgg_init_errors(v_init_errors)
  );

  net_env #(.NAME("lenet-II"), .NL(4), .IMG(28), .CIN(1), .A0(8), .NIMG(2), .OUT_PE(1),
            .KD('{5, 3, 0, 0, 0, 0, 0, 0, 0}), .POOL('{1, 1, 0, 0, 0, 0, 0, 0, 0}),
            .MH('{16, 32, 256, 10, 0, 0, 0, 0, 0}), .PE('{8, 2, 8, 1, 0, 0, 0, 0, 0}),
            .WB('{3, 2, 1, 3, 0, 0, 0, 0, 0}), .OB('{2, 2, 3, 1, 0, 0, 0, 0, 0})) env_lenet (
    .clk, .rst_n, .cmd_valid(l_cmd_valid), .cmd_ready(l_cmd_ready), .cmd(l_cmd),
    .in_valid(l_in_valid), .in_ready(l_in_ready), .in_data(l_in_data),
    .out_valid(l_out_valid), .out_ready(l_out_ready), .out_data(l_out_data),
    .evt_stall(l_evt_stall), .init_writes(l_init_writes), .init_errors(l_init_errors),
    .probe_issue({dut.u_lenet.u_fc2.issue, dut.u_lenet.u_fc1.issue,
                  dut.u_lenet.u_conv2.issue, dut.u_lenet.u_conv1.issue}),
    .probe_replay({!dut.u_lenet.u_fc2.need_input, !dut.u_lenet.u_fc1.need_input,
                   !dut.u_lenet.u_conv2.need_input, !dut.u_lenet.u_conv1.need_input}),
    .done(l_done), .checks(l_checks), .failures(l_failures));

  // Both environments release the shared reset at the same cycle; the VGG7
  // one's reset output is only observed.
  net_env #(.NAME("vgg7-II"), .NL(9), .IMG(32), .CIN(3), .A0(8), .NIMG(1), .OUT_PE(1),
            .KD('{3, 3, 3, 3, 3, 3, 0, 0, 0}), .POOL('{0, 1, 0, 1, 0, 0, 0, 0, 0}),
            .MH('{32, 32, 64, 64, 128, 128, 256, 256, 10}), .PE('{4, 8, 4, 4, 2, 2, 2, 2, 1}),
            .WB('{4, 4, 4, 3, 3, 2, 2, 2, 3}), .OB('{4, 3, 3, 4, 4, 3, 3, 4, 1})) env_vgg (
    .clk, .rst_n(rst_n_v), .cmd_valid(v_cmd_valid), .cmd_ready(v_cmd_ready), .cmd(v_cmd),
    .in_valid(v_in_valid), .in_ready(v_in_ready), .in_data(v_in_data),
    .out_valid(v_out_valid), .out_ready(v_out_ready), .out_data(v_out_data),
    .evt_stall(v_evt_stall), .init_writes(v_init_writes), .init_errors(v_init_errors),
    .probe_issue({dut.u_vgg.u_fc3.issue, dut.u_vgg.u_fc2.issue, dut.u_vgg.u_fc1.issue,
                  dut.u_vgg.u_c6.u_mvau.issue, dut.u_vgg.u_c5.u_mvau.issue,
                  dut.u_vgg.u_c4.u_mvau.issue, dut.u_vgg.u_c3.u_mvau.issue,
                  dut.u_vgg.u_c2.u_mvau.issue, dut.u_vgg.u_c1.u_mvau.issue}),
    .probe_replay({!dut.u_vgg.u_fc3.need_input, !dut.u_vgg.u_fc2.need_input,
                   !dut.u_vgg.u_fc1.need_input, !dut.u_vgg.u_c6.u_mvau.need_input,
                   !dut.u_vgg.u_c5.u_mvau.need_input, !dut.u_vgg.u_c4.u_mvau.need_input,
                   !dut.u_vgg.u_c3.u_mvau.need_input, !dut.u_vgg.u_c2.u_mvau.need_input,
                   !dut.u_vgg.u_c1.u_mvau.need_input}),
    .done(v_done), .checks(v_checks), .failures(v_failures));

  initial begin
    repeat (40_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", l_checks + v_checks, l_failures + v_failures + 1);
    $finish;
  end

  initial begin
    wait (l_done && v_done);
    $display("TB_RESULT checks=%0d failures=%0d", l_checks + v_checks, l_failures + v_failures);
    $finish;
  end
endmodule
