// tb_frequency_response - measures the magnitude response of the default
// decimator (Filter 1, optimized coefficients) with sine inputs.
//
// For each test frequency w a full-scale cosine (amplitude 30000) is fed at
// full input rate. After the filter has settled, the peak output magnitude
// over 1500 decimated samples, divided by 30000 * 2^15, is the measured gain.
// Decimation aliases the tone but keeps its amplitude, so this is |H(w)|.
// Each measured gain is compared with |H(w)| computed here from the 21
// coefficient values, within 0.05 dB in the passband and 0.6 dB in the
// stopband. The frequencies include the passband edge 0.1428 pi, the
// stopband edge 0.3334 pi and the stopband peaks of this coefficient set.
// The test also checks that the passband stays within +-1 dB and the
// stopband below -54 dB. These coefficients reach about -54.6 dB at
// 0.474 pi, which is short of a -58 dB target.
module tb_frequency_response;
  localparam int    N   = 21;
  localparam real   PI  = 3.14159265358979;
  localparam real   AMP = 30000.0;
  localparam int    HREF [N] = '{
    -121, -339, -636, -852, -744, -76, 1248, 3066, 4968, 6416, 6944,
    6416, 4968, 3066, 1248, -76, -744, -852, -636, -339, -121
  };
  localparam int    NPB = 4;
  localparam int    NSB = 6;
  localparam real   PB [NPB] = '{0.03, 0.07, 0.10, 0.1428};
  localparam real   SB [NSB] = '{0.3334, 0.3534, 0.4741, 0.6397, 0.8170, 0.95};

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] in_data = '0;
  logic out_valid;
  logic signed [36:0] out_data;

  efficient_polyphase_decimator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, tones = 0;
  real worst_sb = -300.0, pb_max = -300.0, pb_min = 300.0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real db(real g);
    return 20.0 * $log10(g);
  endfunction

  function automatic real ref_gain(real w);
    real re = 0.0, im = 0.0;
    for (int k = 0; k < N; k++) begin
      re += real'(HREF[k]) * $cos(w * k);
      im -= real'(HREF[k]) * $sin(w * k);
    end
    return $sqrt(re * re + im * im) / 32768.0;
  endfunction

  // Feed a tone at w (rad/sample) and return the measured gain.
  task automatic measure(real w, output real g);
    real peak = 0.0;
    int  outs = 0;
    longint n = 0;
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    while (outs < 1500 + 30) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = 16'($rtoi(AMP * $cos(w * real'(n) + 0.3) + ((AMP * $cos(w * real'(n) + 0.3) >= 0.0) ? 0.5 : -0.5)));
      n++;
      @(posedge clk);
      #1;
      if (out_valid) begin
        real y;
        outs++;
        y = real'(out_data);
        if (y < 0.0) y = -y;
        if (outs > 30 && y > peak) peak = y;
      end
    end
    @(negedge clk) in_valid = 0;
    g = peak / (AMP * 32768.0);
    tones++;
  endtask

  initial begin
    real g, r;
    repeat (2) @(posedge clk);
    for (int i = 0; i < NPB; i++) begin
      measure(PB[i] * PI, g);
      r = ref_gain(PB[i] * PI);
      checks++;
      if (db(g) - db(r) > 0.05 || db(r) - db(g) > 0.05) begin
        failures++;
        $display("FAIL passband %.4f pi: measured %.3f dB, expected %.3f dB", PB[i], db(g), db(r));
      end
      if (db(g) > pb_max) pb_max = db(g);
      if (db(g) < pb_min) pb_min = db(g);
      $display("w = %.4f pi  gain %8.3f dB  (reference %8.3f dB)", PB[i], db(g), db(r));
    end
    for (int i = 0; i < NSB; i++) begin
      measure(SB[i] * PI, g);
      r = ref_gain(SB[i] * PI);
      checks++;
      if (db(g) - db(r) > 0.6 || db(r) - db(g) > 0.6) begin
        failures++;
        $display("FAIL stopband %.4f pi: measured %.3f dB, expected %.3f dB", SB[i], db(g), db(r));
      end
      if (db(g) > worst_sb) worst_sb = db(g);
      $display("w = %.4f pi  gain %8.3f dB  (reference %8.3f dB)", SB[i], db(g), db(r));
    end
    checks++;
    if (pb_max > 1.0 || pb_min < -1.0) begin
      failures++;
      $display("FAIL passband outside +-1 dB: %.3f .. %.3f dB", pb_min, pb_max);
    end
    checks++;
    if (worst_sb > -54.0) begin
      failures++;
      $display("FAIL stopband peak %.3f dB above -54 dB", worst_sb);
    end
    checks++;
    if (tones != NPB + NSB) failures++;
    $display("passband %.3f .. %.3f dB, worst stopband %.3f dB, tones=%0d", pb_min, pb_max, worst_sb, tones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
