// polyphase_subfilter - one polyphase branch E_k(z) in direct form.
//
// Branch k holds the coefficients h[k], h[k+M], h[k+2M], ... of the
// prototype filter: TAPS = N/M of them, rounded up (missing taps are zero).
// Each time in_valid is high, a new low-rate sample u[m] enters the tapped
// delay line and the branch output
//     y_k[m] = sum_i COEF[i] * u[m-i]
// is registered. Every product comes from a pot_const_mult, so a branch
// costs one adder per nonzero coefficient bit plus the tap summation.
//
// Interface: in_valid/in_data at the decimated rate; out_valid follows
// in_valid by one clock. The default COEF is branch 0 of the optimized
// 21-tap set. Output is full precision: DATA_W+COEF_W+clog2(TAPS)
// bits. The direct-form structure follows the filter description; the
// single register stage at the output and the widths are this design's
// choices.
module polyphase_subfilter #(
  parameter int unsigned                   DATA_W = 16,
  parameter int unsigned                   COEF_W = 16,
  parameter int unsigned                   TAPS   = 7,
  parameter logic [TAPS-1:0][COEF_W-1:0]   COEF   = polydec_pkg::H1_OPT_E0,
  localparam int unsigned                  SUM_W  = DATA_W + COEF_W + ((TAPS > 1) ? $clog2(TAPS) : 0)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [SUM_W-1:0]  out_data
);

  localparam int unsigned PW = DATA_W + COEF_W;

  logic signed [DATA_W-1:0] win  [TAPS];   // win[i] = u[m-i] for the current m
  logic signed [DATA_W-1:0] hist [TAPS];   // hist[i] = u[m-1-i], stored samples
  logic signed [PW-1:0]     prod [TAPS];
  logic signed [SUM_W-1:0]  acc;

  always_comb begin
    win[0] = in_data;
    for (int unsigned i = 1; i < TAPS; i++) win[i] = hist[i-1];
  end

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    pot_const_mult #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF(COEF[i])) u_mult (
      .x(win[i]), .p(prod[i])
    );
  end

  always_comb begin
    acc = '0;
    for (int unsigned i = 0; i < TAPS; i++) acc = acc + SUM_W'(prod[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int unsigned i = 0; i < TAPS; i++) hist[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= acc;
        for (int unsigned i = 0; i < TAPS; i++) hist[i] <= win[i];
      end
    end
  end

endmodule
