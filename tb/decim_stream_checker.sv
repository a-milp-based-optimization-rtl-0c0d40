// decim_stream_checker - testbench helper: drives one decimator
// configuration with a random stream and checks it against the direct
// convolution y[m] = sum_j h[j] x[mM-j].
//
// The stream has random idle cycles, full-scale samples and a reset in the
// middle. Each output must appear exactly LAT clocks after the phase-0
// sample that released it. When finished, done rises and checks/failures
// hold the counts; outputs counts the decimated samples seen.
module decim_stream_checker #(
  parameter int unsigned                M       = 3,
  parameter int unsigned                N       = 21,
  parameter logic [N-1:0][15:0]         COEF    = '0,
  parameter int unsigned                SAMPLES = 3000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   outputs
);
  localparam int unsigned OW  = 16 + 16 + $clog2((N + M - 1) / M) + $clog2(M);
  localparam int          LAT = 3;

  logic rst_n = 0, in_valid = 0;
  logic signed [15:0] in_data = '0;
  logic out_valid;
  logic signed [OW-1:0] out_data;

  efficient_polyphase_decimator #(.M(M), .N_TAPS(N), .COEF(COEF)) dut (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data
  );

  longint cycle = 0;
  int hist [$];
  longint exp_val [$];
  longint exp_cyc [$];

  function automatic longint ref_out(int n);
    longint s = 0;
    for (int j = 0; j < int'(N); j++)
      if (n - j >= 0) s += longint'($signed(COEF[j])) * longint'(hist[n - j]);
    return s;
  endfunction

  task automatic step(bit v, logic signed [15:0] d);
    @(negedge clk);
    in_valid = v;
    in_data  = d;
    @(posedge clk);
    cycle++;
    #1;
    if (rst_n && v) begin
      hist.push_back(int'(d));
      if ((hist.size() - 1) % M == 0) begin
        exp_val.push_back(ref_out(hist.size() - 1));
        exp_cyc.push_back(cycle + longint'(LAT) - 1);
      end
    end
    if (out_valid) begin
      checks++;
      if (exp_val.size() == 0) begin
        failures++;
        $display("FAIL M=%0d N=%0d unexpected output", M, N);
      end else begin
        longint ev, ec;
        ev = exp_val.pop_front();
        ec = exp_cyc.pop_front();
        outputs++;
        if (longint'(out_data) != ev || ec != cycle) begin
          failures++;
          $display("FAIL M=%0d N=%0d out=%0d exp=%0d cycle %0d due %0d", M, N, out_data, ev, cycle, ec);
        end
      end
    end else if (exp_cyc.size() != 0 && exp_cyc[0] <= cycle) begin
      checks++;
      failures++;
      $display("FAIL M=%0d N=%0d missing output", M, N);
      void'(exp_val.pop_front());
      void'(exp_cyc.pop_front());
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0; in_valid = 0;
    @(posedge clk); cycle++;
    @(negedge clk);
    rst_n = 1;
    hist.delete(); exp_val.delete(); exp_cyc.delete();
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; outputs = 0;
    for (int r = 0; r < 2; r++) begin
      do_reset();
      repeat (SAMPLES) begin
        logic signed [15:0] d;
        case ($urandom_range(0, 7))
          0:       d = 16'sh7FFF;
          1:       d = 16'sh8000;
          default: d = 16'($urandom);
        endcase
        step($urandom_range(0, 4) != 0, d);
      end
      repeat (LAT + 2) step(0, '0);
      checks++;
      if (exp_val.size() != 0) begin failures++; $display("FAIL outputs never appeared"); end
    end
    done = 1;
  end
endmodule
