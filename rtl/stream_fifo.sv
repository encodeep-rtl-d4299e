// stream_fifo: on-chip streaming buffer that joins two layers of the engine.
//
// A synchronous first-in first-out queue of DEPTH words of W bits with a
// valid/ready handshake on both sides: a word moves when valid and ready are
// both high on a rising clock edge. Because the words are encoded activations,
// W is the layer's bitwidth times the channels per beat, so the buffer shrinks
// with the encoding. The queue accepts while not full and offers while not
// empty; a simultaneous push and pop is allowed when full. Zero-latency
// bypass is not provided: a pushed word is visible on the output the cycle
// after it was written. 'level' reports the occupancy. DEPTH is this design's
// choice (the source only calls these 'streaming buffers').
module stream_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [W-1:0]               in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W-1:0]               out_data,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic push, pop;

  assign out_valid = (count != 0);
  assign in_ready  = (32'(count) < DEPTH) || out_ready;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];
  assign level     = count;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // The producer keeps a word stable until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (out_valid && !out_ready) |=> (out_valid && $stable(out_data));
  endproperty
  a_hold: assert property (p_hold);

endmodule
