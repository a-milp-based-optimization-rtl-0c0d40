// efficient_polyphase_decimator - decimate-by-M FIR filter in efficient
// polyphase form (top level).
//
// The prototype anti-aliasing filter H(z) = sum h[j] z^-j of length N_TAPS
// is split into M polyphase components, H(z) = sum_k z^-k E_k(z^M), with
// E_k holding h[k], h[k+M], h[k+2M], ... Moving the downsampler in front of
// the sub-filters (noble identity) makes every multiply-add run once per
// output sample instead of once per input sample:
//
//   in -> polyphase_commutator -> M x polyphase_subfilter -> branch_sum -> out
//         (delays z^-k + /M)        (E_k, low rate)          (adder)
//
// Output: y[m] = sum_j h[j] x[mM-j], with x[n] = 0 before reset and n = 0 the
// first accepted sample. Coefficients are integers scaled by 2^(COEF_W-1)
// (default: the cost-optimized 21-tap set of polydec_pkg), multiplied
// without multipliers (one adder per nonzero coefficient bit).
//
// Timing: one input sample per clock at most (in_valid, no back-pressure).
// For each input sample whose index is a multiple of M, out_valid pulses
// exactly LATENCY = 3 clocks after that sample was presented: one clock in
// the commutator, one in the sub-filters, one in the output adder. The
// output is full precision, OUT_W bits, never overflows, and is not
// rounded.
// The structure, M, N_TAPS and the coefficient set follow the filter
// description; widths, pipeline registers, the valid strobe and the
// synchronous active-low reset are this design's choices.
module efficient_polyphase_decimator
  import polydec_pkg::*;
#(
  parameter int unsigned                     M      = 3,
  parameter int unsigned                     N_TAPS = polydec_pkg::H1_TAPS,
  parameter int unsigned                     DATA_W = 16,
  parameter logic [N_TAPS-1:0][COEF_W-1:0]   COEF   = polydec_pkg::H1_OPT,
  localparam int unsigned                    L      = (N_TAPS + M - 1) / M,
  localparam int unsigned                    BR_W   = DATA_W + COEF_W + ((L > 1) ? $clog2(L) : 0),
  localparam int unsigned                    OUT_W  = BR_W + ((M > 1) ? $clog2(M) : 0)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_data
);

  // Coefficients of branch k: COEF[k + i*M], zero beyond the filter length.
  function automatic logic [L-1:0][COEF_W-1:0] branch_coef(int unsigned k);
    logic [L-1:0][COEF_W-1:0] c;
    for (int unsigned i = 0; i < L; i++)
      c[i] = (k + i*M < N_TAPS) ? COEF[k + i*M] : '0;
    return c;
  endfunction

  logic                     frame_valid;
  logic signed [DATA_W-1:0] frame  [M];
  logic [M-1:0]             br_valid;
  logic signed [BR_W-1:0]   br_data [M];

  polyphase_commutator #(.DATA_W(DATA_W), .M(M)) u_comm (
    .clk, .rst_n,
    .in_valid, .in_data,
    .frame_valid, .frame
  );

  for (genvar k = 0; k < M; k++) begin : g_branch
    polyphase_subfilter #(
      .DATA_W(DATA_W), .COEF_W(COEF_W), .TAPS(L), .COEF(branch_coef(k))
    ) u_sub (
      .clk, .rst_n,
      .in_valid (frame_valid),
      .in_data  (frame[k]),
      .out_valid(br_valid[k]),
      .out_data (br_data[k])
    );
  end

  branch_sum #(.IN_W(BR_W), .M(M), .OUT_W(OUT_W)) u_sum (
    .clk, .rst_n,
    .in_valid (br_valid[0]),
    .in_data  (br_data),
    .out_valid,
    .out_data
  );

  // All branches are driven by the same frame strobe and stay in step.
  a_branches_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    br_valid == '0 || br_valid == '1);

endmodule
