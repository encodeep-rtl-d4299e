// encodeep_pkg: types and constants shared by the encoded-DNN streaming engine.
//
// All arithmetic is signed fixed point with BFIX bits of which FRAC are
// fractional (16-bit Q7.8 by default, one 25x18 DSP multiplier per product).
// Codebook entries, decoded weights/activations and batch-norm gamma/beta use
// this format; products carry 2*FRAC fractional bits and are summed in an
// ACCW-bit accumulator. The fixed-point format itself is a choice of this
// design: the encoding scheme only requires that codebooks hold fixed-point
// values.
//
// cfg_wr_t is one write command of the parameter-initialization path: it names
// a layer, a target memory inside it, a PE, a SIMD lane, a word address and
// the value to write.
package encodeep_pkg;

  localparam int unsigned BFIX = 16;   // fixed-point word (codebooks, BN, logits)
  localparam int unsigned FRAC = 8;    // fractional bits of a BFIX word
  localparam int unsigned ACCW = 48;   // accumulator width (products have 2*FRAC frac bits)

  typedef logic signed [BFIX-1:0] fix_t;
  typedef logic signed [ACCW-1:0] acc_t;

  // Target memory selected by a parameter write.
  typedef enum logic [2:0] {
    TGT_WMEM  = 3'd0,  // encoded weight SRAM of one PE (addr = word, lane = SIMD partition)
    TGT_WCB   = 3'd1,  // weight codebook of one PE (addr = code)
    TGT_ICB   = 3'd2,  // input (activation) decoder codebook of the layer (addr = code)
    TGT_OCB   = 3'd3,  // output encoder codebook of the layer (addr = code, sorted ascending)
    TGT_GAMMA = 3'd4,  // batch-norm scale of one PE (addr = neuron fold index)
    TGT_BETA  = 3'd5   // batch-norm bias of one PE (addr = neuron fold index)
  } cfg_tgt_e;

  typedef struct packed {
    logic [3:0]  layer;   // layer index in the network
    cfg_tgt_e    tgt;     // memory inside the layer
    logic [7:0]  pe;      // PE index (per-PE targets)
    logic [7:0]  lane;    // SIMD lane (weight SRAM partition)
    logic [19:0] addr;    // word / code / neuron index
    logic [15:0] data;    // value (encoded weight or fixed-point word)
  } cfg_wr_t;

  // Saturate a wide signed value to a BFIX word.
  function automatic fix_t sat_fix(input logic signed [63:0] v);
    if (v > 64'sd32767)       return fix_t'(16'sh7fff);
    else if (v < -64'sd32768) return fix_t'(16'sh8000);
    else                      return fix_t'(v[BFIX-1:0]);
  endfunction

endpackage
