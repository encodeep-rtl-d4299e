// tb_init_kernel: self-checking test of the parameter-initialization path.
// Sends random write commands, some to layers that do not exist, with random
// gaps; checks that one cycle later exactly the addressed layer's strobe is
// high (none for a bad layer), that the forwarded command equals the one sent,
// and that the accepted/dropped counters match the counts kept here.
module tb_init_kernel;
  import encodeep_pkg::*;
  localparam int NLAYERS = 3;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  cfg_wr_t cmd = '0, cfg;
  logic [NLAYERS-1:0] cfg_en;
  logic [31:0] wr_cnt, bad_cnt;
  int checks = 0, failures = 0, nwr = 0, nbad = 0;

  init_kernel #(.NLAYERS(NLAYERS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      cfg_wr_t c;
      c = cfg_wr_t'({$urandom, $urandom});
      c.layer = 4'($urandom_range(0, NLAYERS + 1));
      c.tgt = cfg_tgt_e'($urandom_range(0, 5));
      cmd_valid = 1; cmd = c;
      checks++; if (!cmd_ready) begin failures++; $display("not ready"); end
      @(negedge clk);
      cmd_valid = 0;
      if (int'(c.layer) < NLAYERS) nwr++; else nbad++;
      checks++;
      if (cfg_en != ((int'(c.layer) < NLAYERS) ? NLAYERS'(1 << c.layer) : '0)) begin
        failures++; $display("layer %0d: strobes %b", c.layer, cfg_en);
      end
      checks++;
      if (cfg !== c) begin failures++; $display("command not forwarded"); end
      if ($urandom_range(0, 1)) begin
        @(negedge clk);
        checks++; if (cfg_en != '0) begin failures++; $display("strobe not a pulse"); end
      end
    end
    checks++;
    if (wr_cnt != 32'(nwr) || bad_cnt != 32'(nbad)) begin
      failures++; $display("counters %0d/%0d want %0d/%0d", wr_cnt, bad_cnt, nwr, nbad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
