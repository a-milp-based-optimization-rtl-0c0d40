// polyphase_commutator - input delay chain and downsamplers of the
// efficient polyphase decimator.
//
// Branch k of an M-branch polyphase decimator sees u_k[m] = x[mM-k]: the
// input delayed by k samples and then downsampled by M. Here the delays
// z^-1 .. z^-(M-1) are a shift register of the last M-1 input samples, and
// the M downsamplers are one shared phase counter. The input sample whose
// index n is a multiple of M (phase 0; the first sample after reset is n=0)
// releases a frame: frame[0] = x[n], frame[k] = x[n-k]. Samples before
// reset count as zero. Everything after this block runs once per frame, at
// 1/M of the input rate, which is what makes the structure efficient.
//
// Interface: in_valid/in_data, one sample per clock at most (no
// back-pressure). frame_valid pulses for one clock, one clock after the
// phase-0 sample was accepted, with frame[] registered.
// The delay-then-downsample arrangement follows the filter's structure; the
// valid strobe, the single shared phase counter and the synchronous
// active-low reset are this design's choices.
module polyphase_commutator #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned M      = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     frame_valid,
  output logic signed [DATA_W-1:0] frame [M]
);

  localparam int unsigned PH_W = (M > 1) ? $clog2(M) : 1;

  logic [PH_W-1:0]          phase;       // index of the next sample, mod M
  logic signed [DATA_W-1:0] dly [M];     // dly[k-1] = x[n-k]; dly[M-1] unused

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase       <= '0;
      frame_valid <= 1'b0;
      for (int unsigned k = 0; k < M; k++) begin
        dly[k]   <= '0;
        frame[k] <= '0;
      end
    end else begin
      frame_valid <= 1'b0;
      if (in_valid) begin
        if (phase == '0) begin
          frame_valid <= 1'b1;
          frame[0]    <= in_data;
          for (int unsigned k = 1; k < M; k++) frame[k] <= dly[k-1];
        end
        dly[0] <= in_data;
        for (int unsigned k = 1; k < M; k++) dly[k] <= dly[k-1];
        phase <= (phase == PH_W'(M - 1)) ? '0 : phase + 1'b1;
      end
    end
  end

endmodule
