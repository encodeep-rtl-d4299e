// act_encoder: online activation encoder of an MVAU.
//
// For each of LANES fixed-point features y (one per PE) it returns the index
// of the nearest codebook entry, y_enc = argmin_i |y - c[i]|, i = 0..K-1,
// K = 2**CBITS. As in the source design the search is linear: the codebook
// sits in a small memory that is read one entry per cycle, and every lane
// compares that entry with its own feature, so a search takes K cycles
// regardless of LANES. On a tie the lower index wins. When the codebook is
// sorted ascending with c[0] = 0, every negative feature maps to code 0, so the
// encoder also performs ReLU.
//
// Interface: in_valid/in_ready accept a vector of LANES features (in_ready
// only while idle); out_valid/out_ready hand over the LANES codes, which stay
// stable until taken. Timing: a vector accepted at edge t is offered as
// output after edge t+K. The codebook is written through wr_en/wr_addr/wr_data.
module act_encoder
  import encodeep_pkg::*;
#(
  parameter int unsigned CBITS = 2,
  parameter int unsigned LANES = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_en,
  input  logic [CBITS-1:0]             wr_addr,
  input  fix_t                         wr_data,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  fix_t [LANES-1:0]             in_y,
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [LANES-1:0][CBITS-1:0]  out_code
);
  localparam int unsigned K = 1 << CBITS;

  typedef enum logic [1:0] {S_IDLE, S_SEARCH, S_DONE} state_e;
  state_e state;

  fix_t cb [K];
  logic [CBITS-1:0]  idx;
  fix_t [LANES-1:0]  y_q;
  logic [BFIX:0]     best [LANES];   // |y - c| needs one bit more than a BFIX word
  logic [BFIX:0]     dlt [LANES];
  fix_t              c_rd;

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_DONE);
  assign c_rd      = cb[idx];

  always_ff @(posedge clk) begin
    if (wr_en) cb[wr_addr] <= wr_data;
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [BFIX:0] diff;
      diff    = {y_q[l][BFIX-1], y_q[l]} - {c_rd[BFIX-1], c_rd};
      dlt[l] = diff[BFIX] ? (BFIX+1)'(-diff) : diff;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      idx      <= '0;
      y_q      <= '0;
      out_code <= '0;
      for (int l = 0; l < LANES; l++) best[l] <= '0;
    end else begin
      case (state)
        S_IDLE: if (in_valid) begin
          y_q   <= in_y;
          idx   <= '0;
          state <= S_SEARCH;
        end
        S_SEARCH: begin
          for (int l = 0; l < LANES; l++) begin
            if (idx == '0 || dlt[l] < best[l]) begin
              best[l]     <= dlt[l];
              out_code[l] <= idx;
            end
          end
          idx <= idx + 1'b1;
          if (idx == CBITS'(K - 1)) state <= S_DONE;
        end
        S_DONE: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_code)));

endmodule
