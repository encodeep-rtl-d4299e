// tb_swu: self-checking test of the sliding window unit.
// Streams three random encoded frames (IFM_CH channels in SIMD groups) with
// random input gaps and random output back-pressure, and compares every output
// word with the window order (oy, ox, ky, kx, channel group) computed here.
// Runs one instance with stride 1 and one with stride 2. Checks the number of
// output words per frame, that a frame completion event fires per frame, and
// that the next frame is loaded while the previous one is still replayed.
module tb_swu;
  localparam int CH = 4, DIM = 7, KD = 3, SIMD = 2, BITS = 3;
  localparam int CG = CH / SIMD;
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

  // ---- one test harness per stride ----
  logic [1:0] done;
  for (genvar gi = 0; gi < 2; gi++) begin : g_t
    localparam int ST = gi + 1;
    localparam int OD = (DIM - KD) / ST + 1;
    logic in_valid = 0, in_ready, out_valid, out_ready = 0, evt_frame;
    logic [SIMD*BITS-1:0] in_data = '0, out_data;
    logic [SIMD*BITS-1:0] frame [NFRAMES][DIM*DIM*CG];
    int nout = 0, nev = 0, nboth = 0;

    swu #(.IFM_CH(CH), .IFM_DIM(DIM), .KD(KD), .STRIDE(ST), .SIMD(SIMD), .BITS(BITS)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .evt_frame);

    always @(posedge clk) if (rst_n) begin
      if (evt_frame) nev++;
      if (in_valid && in_ready && out_valid) nboth++;   // next frame loads during replay
    end

    initial begin
      done[gi] = 0;
      for (int f = 0; f < NFRAMES; f++)
        for (int i = 0; i < DIM * DIM * CG; i++) frame[f][i] = (SIMD*BITS)'($urandom);
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
              for (int ky = 0; ky < KD; ky++) for (int kx = 0; kx < KD; kx++)
                for (int g = 0; g < CG; g++) begin
                  logic [SIMD*BITS-1:0] want;
                  want = frame[f][((oy*ST + ky) * DIM + ox*ST + kx) * CG + g];
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
                    $display("stride %0d frame %0d (%0d,%0d,%0d,%0d,%0d): %h want %h", ST, f, oy, ox, ky, kx, g, out_data, want);
                  end
                  #1 out_ready = 0;
                end
        end
      join
      repeat (3) @(posedge clk);
      checks++;
      if (nout != NFRAMES * OD * OD * KD * KD * CG || nev != NFRAMES || nboth == 0) begin
        failures++; $display("stride %0d: %0d words, %0d frame events, %0d overlapped loads", ST, nout, nev, nboth);
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
