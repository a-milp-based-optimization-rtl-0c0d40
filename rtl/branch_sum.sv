// branch_sum - output adder of the polyphase decimator.
//
// By superposition, the decimated output is the sum of the M branch
// outputs: y[m] = y_0[m] + y_1[m] + ... + y_{M-1}[m]. This block adds them
// with sign extension to OUT_W bits and registers the result.
//
// Interface: in_valid qualifies all M inputs at once; out_valid and
// out_data follow one clock later. Summing the branches follows the
// filter's structure; the register and the full-precision width are this
// design's choices.
module branch_sum #(
  parameter int unsigned IN_W  = 35,
  parameter int unsigned M     = 3,
  parameter int unsigned OUT_W = IN_W + ((M > 1) ? $clog2(M) : 0)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data [M],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  logic signed [OUT_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int unsigned k = 0; k < M; k++) sum = sum + OUT_W'(in_data[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= sum;
    end
  end

endmodule
