// polydec_pkg - shared constants for the efficient polyphase decimator.
//
// Holds the coefficient word width and the two coefficient sets of the
// 21-tap, decimate-by-3 anti-aliasing filter ("Filter 1"): the quantized set
// and the cost-optimized set. Each word is the coefficient scaled by 2^15
// and rounded, stored as a 16-bit two's-complement integer, so that the
// filter gain at DC is about 2^15. The cost of a coefficient is the number
// of 1 bits in its 16-bit word; every 1 bit costs one adder in the
// multiplierless multiplier (pot_const_mult). The quantized set costs 192,
// the optimized set 179. The optimized set differs from the quantized one
// in taps 2, 3, 4, 5 and 10 (and their mirror images), each moved by one
// or a few LSBs to a word with fewer 1 bits.
//
// The coefficient values and costs follow the published tables; the array
// layout is this design's choice: element [k] multiplies x[n-k].
package polydec_pkg;

  localparam int unsigned COEF_W  = 16;
  localparam int unsigned H1_TAPS = 21;

  typedef logic signed [COEF_W-1:0] coef_t;

  // Quantized (unoptimized) coefficient words, cost 192.
  localparam logic [H1_TAPS-1:0][COEF_W-1:0] H1_QUANT = {
    16'd65415, 16'd65197, 16'd64901, 16'd64685, 16'd64791, 16'd65461,
    16'd1248,  16'd3066,  16'd4968,  16'd6416,  16'd6958,  16'd6416,
    16'd4968,  16'd3066,  16'd1248,  16'd65461, 16'd64791, 16'd64685,
    16'd64901, 16'd65197, 16'd65415
  };

  // Cost-optimized coefficient words, cost 179.
  localparam logic [H1_TAPS-1:0][COEF_W-1:0] H1_OPT = {
    16'd65415, 16'd65197, 16'd64900, 16'd64684, 16'd64792, 16'd65460,
    16'd1248,  16'd3066,  16'd4968,  16'd6416,  16'd6944,  16'd6416,
    16'd4968,  16'd3066,  16'd1248,  16'd65460, 16'd64792, 16'd64684,
    16'd64900, 16'd65197, 16'd65415
  };

  // Polyphase component k of a 21-tap, M = 3 set: h[k], h[k+3], ..., h[k+18].
  localparam int unsigned H1_M = 3;
  localparam int unsigned H1_L = H1_TAPS / H1_M;

  function automatic logic [H1_L-1:0][COEF_W-1:0] h1_branch(
      logic [H1_TAPS-1:0][COEF_W-1:0] h, int unsigned k);
    logic [H1_L-1:0][COEF_W-1:0] c;
    for (int unsigned i = 0; i < H1_L; i++) c[i] = h[k + i*H1_M];
    return c;
  endfunction

  // Branch 0 of the optimized set (default of a stand-alone sub-filter).
  localparam logic [H1_L-1:0][COEF_W-1:0] H1_OPT_E0 = h1_branch(H1_OPT, 0);

  // Number of nonzero bits of a coefficient word (its adder cost).
  function automatic int unsigned coef_cost(logic [COEF_W-1:0] w);
    int unsigned c = 0;
    for (int unsigned i = 0; i < COEF_W; i++) c += int'(w[i]);
    return c;
  endfunction

endpackage
