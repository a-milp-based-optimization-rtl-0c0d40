// tb_filter_workloads - runs the decimator in the configurations it is
// evaluated in, besides the default one:
//   * Filter 1 (M = 3, 21 taps) with the quantized, not cost-optimized
//     coefficients;
//   * Filter 2 (M = 4, 28 taps). Its coefficients are not published, so a
//     stand-in symmetric 28-tap set is generated here: the test checks the
//     structure (4 branches of 7 taps), not a frequency response.
// Each configuration is driven by decim_stream_checker with a random
// stream and compared with the direct convolution.
module tb_filter_workloads;
  import polydec_pkg::*;

  // Stand-in symmetric coefficients: an integer formula, mirrored about the
  // centre, with negative outer taps like a lowpass.
  function automatic logic [27:0][15:0] filter2_standin();
    logic [27:0][15:0] c;
    for (int j = 0; j < 14; j++) begin
      int v;
      v = (j < 4) ? -(40 + 97 * j) : (j * j * 61 - 300);
      c[j]      = 16'(v);
      c[27 - j] = 16'(v);
    end
    return c;
  endfunction

  logic clk = 0;
  always #5 clk = ~clk;

  logic done1, done2;
  int c1, f1, o1, c2, f2, o2;

  decim_stream_checker #(.M(3), .N(21), .COEF(H1_QUANT)) u_f1q (
    .clk, .done(done1), .checks(c1), .failures(f1), .outputs(o1)
  );
  decim_stream_checker #(.M(4), .N(28), .COEF(filter2_standin())) u_f2 (
    .clk, .done(done2), .checks(c2), .failures(f2), .outputs(o2)
  );

  initial begin
    fork
      begin
        repeat (100000) @(posedge clk);
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
        $finish;
      end
    join_none
    wait (done1 && done2);
    begin
      int checks, failures;
      checks = c1 + c2 + 2;
      failures = f1 + f2;
      if (o1 < 1000) begin failures++; $display("FAIL Filter 1 outputs %0d", o1); end
      if (o2 < 1000) begin failures++; $display("FAIL Filter 2 outputs %0d", o2); end
      $display("filter1_quantized outputs=%0d  filter2_structure outputs=%0d", o1, o2);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    end
    $finish;
  end
endmodule
