// tb_encodeep_vgg7: end-to-end test of the encoded VGG7 engine with its
// layer structure intact but narrow layers: a 33x33x3 image, 4/8/8 conv
// channels, 16 hidden neurons, 4 classes, two images back to back. The conv2
// map is 29x29, so the first pooling drops a row and a column. net_env builds
// the network, drives the engine and checks every logit bit-exactly.
module tb_encodeep_vgg7;
  import encodeep_pkg::*;
  localparam int NL = 9;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, cmd_valid, cmd_ready, in_valid, in_ready, out_valid, out_ready, done;
  cfg_wr_t cmd;
  logic [23:0] in_data;
  logic [BFIX-1:0] out_data;
  logic [NL-1:0] evt_stall;
  logic [31:0] init_writes, init_errors;
  int checks, failures;

  encodeep_vgg7 #(
    .IMG(33), .C1(4), .C2(8), .C3(8), .F1(16), .NCLASS(4),
    .PE1(2), .PE2(4), .PE3(2), .PE4(4), .PE5(2), .PE6(2), .PE7(4), .PE8(2), .PE9(1)
  ) dut (.*);

  net_env #(.NAME("vgg7"), .NL(NL), .IMG(33), .CIN(3), .A0(8), .NIMG(2), .OUT_PE(1),
            .KD('{3, 3, 3, 3, 3, 3, 0, 0, 0}), .POOL('{0, 1, 0, 1, 0, 0, 0, 0, 0}),
            .MH('{4, 4, 8, 8, 8, 8, 16, 16, 4}), .PE('{2, 4, 2, 4, 2, 2, 4, 2, 1}),
            .WB('{4, 4, 4, 4, 4, 3, 4, 3, 3}), .OB('{4, 3, 3, 4, 4, 3, 3, 4, 1})) env (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .evt_stall, .init_writes, .init_errors,
    .probe_issue({dut.u_fc3.issue, dut.u_fc2.issue, dut.u_fc1.issue,
                  dut.u_c6.u_mvau.issue, dut.u_c5.u_mvau.issue, dut.u_c4.u_mvau.issue,
                  dut.u_c3.u_mvau.issue, dut.u_c2.u_mvau.issue, dut.u_c1.u_mvau.issue}),
    .probe_replay({!dut.u_fc3.need_input, !dut.u_fc2.need_input, !dut.u_fc1.need_input,
                   !dut.u_c6.u_mvau.need_input, !dut.u_c5.u_mvau.need_input,
                   !dut.u_c4.u_mvau.need_input, !dut.u_c3.u_mvau.need_input,
                   !dut.u_c2.u_mvau.need_input, !dut.u_c1.u_mvau.need_input}),
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
