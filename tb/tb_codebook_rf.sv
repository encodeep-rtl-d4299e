// tb_codebook_rf: self-checking test of the codebook register file.
// Checks that entries read zero after reset, then loads a random codebook and
// reads it back through all NRD ports at once with random codes, comparing
// against a copy kept by the testbench; rewrites one entry and checks that
// only that entry changed and that the write is visible on the next cycle.
module tb_codebook_rf;
  import encodeep_pkg::*;
  localparam int CBITS = 3;
  localparam int NRD   = 4;
  localparam int K     = 1 << CBITS;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [CBITS-1:0] wr_addr = '0;
  fix_t wr_data = '0;
  logic [NRD-1:0][CBITS-1:0] rd_code = '0;
  fix_t [NRD-1:0] rd_data;
  int checks = 0, failures = 0;
  fix_t model [K];

  codebook_rf #(.CBITS(CBITS), .NRD(NRD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int t = 0; t < 40; t++) begin
      for (int p = 0; p < NRD; p++) rd_code[p] = CBITS'($urandom_range(0, K - 1));
      #1;
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rd_data[p] !== model[rd_code[p]]) begin
          failures++;
          $display("port %0d code %0d: got %h want %h", p, rd_code[p], rd_data[p], model[rd_code[p]]);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    for (int i = 0; i < K; i++) model[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check_reads();
    for (int i = 0; i < K; i++) begin
      model[i] = fix_t'($urandom);
      wr_en = 1; wr_addr = CBITS'(i); wr_data = model[i];
      @(negedge clk);
    end
    wr_en = 0;
    check_reads();
    // single rewrite, visible on the next cycle
    model[5] = 16'sh1234;
    wr_en = 1; wr_addr = 3'd5; wr_data = model[5];
    @(negedge clk);
    wr_en = 0;
    rd_code = '0; rd_code[0] = 3'd5; rd_code[1] = 3'd4; #1;
    checks++; if (rd_data[0] !== 16'sh1234) begin failures++; $display("rewrite not visible"); end
    checks++; if (rd_data[1] !== model[4]) begin failures++; $display("neighbour entry changed"); end
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
