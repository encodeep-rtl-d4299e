// tb_mpu: self-checking test of the max-pooling unit on encoded values.
// Streams random code maps (raster order, LANES channels per beat) with random
// input gaps and output back-pressure into two instances: DIM = 6 (exact
// tiling) and DIM = 7 (last row and column dropped). Each pooled word is
// compared lane by lane with the maximum of its 2x2 window computed here; the
// number of output words per frame is checked too.
module tb_mpu;
  localparam int CH = 4, P = 2, LANES = 2, BITS = 3;
  localparam int CG = CH / LANES;
  localparam int NFRAMES = 3;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] done;
  for (genvar gi = 0; gi < 2; gi++) begin : g_t
    localparam int DIM = 6 + gi;
    localparam int OD = DIM / P;
    logic in_valid = 0, in_ready, out_valid, out_ready = 0;
    logic [LANES-1:0][BITS-1:0] in_data = '0, out_data;
    logic [LANES-1:0][BITS-1:0] frame [NFRAMES][DIM*DIM*CG];
    int nout = 0;

    mpu #(.CH(CH), .DIM(DIM), .P(P), .LANES(LANES), .BITS(BITS)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

    initial begin
      done[gi] = 0;
      for (int f = 0; f < NFRAMES; f++)
        for (int i = 0; i < DIM * DIM * CG; i++) frame[f][i] = (LANES*BITS)'($urandom);
      wait (rst_n);
      fork
        begin : drive
          for (int f = 0; f < NFRAMES; f++)
            for (int i = 0; i < DIM * DIM * CG; i++) begin
              @(negedge clk);
              while ($urandom_range(0, 3) == 0) @(negedge clk);
              in_valid = 1; in_data = frame[f][i];
              @(posedge clk);
              while (!in_ready) @(posedge clk);
              #1 in_valid = 0;
            end
        end
        begin : sink
          for (int f = 0; f < NFRAMES; f++)
            for (int oy = 0; oy < OD; oy++) for (int ox = 0; ox < OD; ox++)
              for (int g = 0; g < CG; g++) begin
                logic [LANES-1:0][BITS-1:0] want;
                for (int l = 0; l < LANES; l++) begin
                  want[l] = '0;
                  for (int py = 0; py < P; py++) for (int px = 0; px < P; px++) begin
                    logic [LANES-1:0][BITS-1:0] w;
                    w = frame[f][((oy*P + py) * DIM + ox*P + px) * CG + g];
                    if (w[l] > want[l]) want[l] = w[l];
                  end
                end
                @(negedge clk);
                out_ready = ($urandom_range(0, 2) != 0);
                @(posedge clk);
                while (!(out_valid && out_ready)) begin
                  #1 out_ready = ($urandom_range(0, 2) != 0);
                  @(posedge clk);
                end
                checks++; nout++;
                if (out_data !== want) begin
                  failures++;
                  $display("DIM %0d frame %0d (%0d,%0d,%0d): %h want %h", DIM, f, oy, ox, g, out_data, want);
                end
                #1 out_ready = 0;
              end
        end
      join
      repeat (20) @(posedge clk);
      checks++;
      if (nout != NFRAMES * OD * OD * CG || out_valid) begin
        failures++; $display("DIM %0d: %0d words, extra output %0b", DIM, nout, out_valid);
      end
      done[gi] = 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
