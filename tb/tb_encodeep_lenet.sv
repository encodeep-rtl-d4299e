// tb_encodeep_lenet: end-to-end test of the encoded LeNet engine at reduced
// size: 12x12 image, 4 and 8 conv channels, 16 hidden neurons, 4 classes,
// three images back to back. The conv2 map is odd-sized, so pooling drops a
// row and a column. Folds are short, so the encoder hold-back stall occurs.
// net_env builds the network, drives the engine and checks every logit
// against its bit-exact model; this module only wires the two together.
module tb_encodeep_lenet;
  import encodeep_pkg::*;
  localparam int NL = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, cmd_valid, cmd_ready, in_valid, in_ready, out_valid, out_ready, done;
  cfg_wr_t cmd;
  logic [7:0] in_data;
  logic [2*BFIX-1:0] out_data;
  logic [NL-1:0] evt_stall;
  logic [31:0] init_writes, init_errors;
  int checks, failures;

  encodeep_lenet #(
    .IMG(12), .C1(4), .K1(3), .C2(8), .K2(3), .F1(16), .NCLASS(4),
    .PE1(2), .SIMD2(2), .PE2(2), .SIMD3(2), .PE3(4), .SIMD4(4), .PE4(2)
  ) dut (.*);

  net_env #(.NAME("lenet"), .NL(NL), .IMG(12), .CIN(1), .A0(8), .NIMG(3), .OUT_PE(2),
            .KD('{3, 3, 0, 0, 0, 0, 0, 0, 0}), .POOL('{1, 1, 0, 0, 0, 0, 0, 0, 0}), .MH('{4, 8, 16, 4, 0, 0, 0, 0, 0}), .PE('{2, 2, 4, 2, 0, 0, 0, 0, 0}),
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
