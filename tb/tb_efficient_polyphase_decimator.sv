// tb_efficient_polyphase_decimator - end-to-end test of the decimator at its
// default parameters (M = 3, 21 taps, cost-optimized coefficients).
//
// The reference is the direct definition y[m] = sum_j h[j] x[3m-j], with the
// 21 signed coefficients listed here independently of the RTL. The test
//   1. checks the adder cost of the two coefficient sets (192 and 179);
//   2. recovers all 21 coefficients from impulses at phases 0, 1 and 2;
//   3. checks the DC gain with a constant input;
//   4. runs random streams (full-scale values included) with random idle
//      cycles, full-rate bursts and a reset in the middle.
// Every output is compared in value and in timing: it must appear exactly
// 3 clocks after the phase-0 input sample that released it, and there must
// be one output per 3 accepted inputs and none otherwise.
module tb_efficient_polyphase_decimator;
  import polydec_pkg::*;

  localparam int M   = 3;
  localparam int N   = 21;
  localparam int LAT = 3;
  localparam int HREF [N] = '{
    -121, -339, -636, -852, -744, -76, 1248, 3066, 4968, 6416, 6944,
    6416, 4968, 3066, 1248, -76, -744, -852, -636, -339, -121
  };

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] in_data = '0;
  logic out_valid;
  logic signed [36:0] out_data;

  efficient_polyphase_decimator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_out = 0, n_idle = 0, n_burst = 0, n_reset = 0, n_impulse = 0, n_neg = 0;
  longint cycle = 0;
  int hist [$];                 // accepted samples since reset
  longint exp_val [$];          // pending expected outputs
  longint exp_cyc [$];          // the cycle each is due in
  int run_len = 0;              // consecutive accepted samples

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_out(int n);
    longint s = 0;
    for (int j = 0; j < N; j++) if (n - j >= 0) s += longint'(HREF[j]) * longint'(hist[n - j]);
    return s;
  endfunction

  // One clock: present (v, d), then check what the design shows after the edge.
  task automatic step(bit v, logic signed [15:0] d);
    @(negedge clk);
    in_valid = v;
    in_data  = d;
    @(posedge clk);
    cycle++;
    #1;
    if (rst_n && v) begin
      hist.push_back(int'(d));
      run_len++;
      if (run_len == M) n_burst++;
      if ((hist.size() - 1) % M == 0) begin
        exp_val.push_back(ref_out(hist.size() - 1));
        exp_cyc.push_back(cycle + longint'(LAT) - 1);
      end
    end else begin
      run_len = 0;
      if (rst_n) n_idle++;
    end
    if (out_valid) begin
      checks++;
      if (exp_val.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d at cycle %0d", out_data, cycle);
      end else begin
        longint ev, ec;
        ev = exp_val.pop_front();
        ec = exp_cyc.pop_front();
        n_out++;
        if (ev < 0) n_neg++;
        if (longint'(out_data) != ev || ec != cycle) begin
          failures++;
          $display("FAIL out=%0d exp=%0d at cycle %0d (due %0d)", out_data, ev, cycle, ec);
        end
      end
    end else if (exp_cyc.size() != 0 && exp_cyc[0] <= cycle) begin
      checks++;
      failures++;
      $display("FAIL missing output due at cycle %0d", exp_cyc[0]);
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
    hist.delete();
    exp_val.delete();
    exp_cyc.delete();
    run_len = 0;
  endtask

  task automatic flush();
    repeat (LAT + 2) step(0, '0);
    checks++;
    if (exp_val.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs never appeared", exp_val.size());
    end
  endtask

  initial begin
    int cost_q = 0, cost_o = 0;
    // 1. Coefficient cost of both sets, as published: 192 and 179.
    for (int j = 0; j < N; j++) begin
      cost_q += int'(coef_cost(H1_QUANT[j]));
      cost_o += int'(coef_cost(H1_OPT[j]));
    end
    checks += 2;
    if (cost_q != 192) begin failures++; $display("FAIL quantized cost %0d", cost_q); end
    if (cost_o != 179) begin failures++; $display("FAIL optimized cost %0d", cost_o); end

    repeat (2) @(posedge clk);
    do_reset();

    // 2. Impulse at phase p: output m must equal h[3m - p].
    for (int p = 0; p < M; p++) begin
      int got [$];
      got.delete();
      do_reset();
      n_reset++;
      for (int i = 0; i < 40; i++) begin
        step(1, (i == p) ? 16'sd1 : 16'sd0);
        if (out_valid) got.push_back(int'(out_data));
      end
      for (int i = 0; i < LAT; i++) begin
        step(0, '0);
        if (out_valid) got.push_back(int'(out_data));
      end
      for (int m = 0; m < got.size(); m++) begin
        int j, e;
        j = m * M - p;
        e = (j >= 0 && j < N) ? HREF[j] : 0;
        checks++;
        if (got[m] != e) begin
          failures++;
          $display("FAIL impulse phase %0d output %0d = %0d, expected h[%0d] = %0d", p, m, got[m], j, e);
        end
      end
      n_impulse++;
    end

    // 3. DC gain: constant 1000 settles to 1000 * sum(h).
    do_reset();
    repeat (3 * N) step(1, 16'sd1000);
    begin
      int s = 0;
      foreach (HREF[j]) s += HREF[j];
      checks++;
      if (longint'(out_data) != 64'sd1000 * s) begin
        failures++;
        $display("FAIL DC output %0d, expected %0d", out_data, 1000 * s);
      end
    end
    flush();

    // 4. Random streams with idle cycles and full-rate bursts, reset between.
    for (int r = 0; r < 3; r++) begin
      do_reset();
      n_reset++;
      repeat (3000) begin
        bit v;
        logic signed [15:0] d;
        v = (r == 0) ? 1'b1 : ($urandom_range(0, 3) != 0);
        case ($urandom_range(0, 7))
          0:       d = 16'sh7FFF;
          1:       d = 16'sh8000;
          default: d = 16'($urandom);
        endcase
        step(v, d);
      end
      // Reset arrives while outputs are still in flight: they must be dropped.
      if (r == 1) begin
        do_reset();
        n_reset++;
      end
      flush();
    end

    // Each mechanism must have happened at least once.
    checks++; if (n_out < 1000)  begin failures++; $display("FAIL few outputs %0d", n_out); end
    checks++; if (n_idle == 0)   begin failures++; $display("FAIL no idle input cycle"); end
    checks++; if (n_burst == 0)  begin failures++; $display("FAIL no full-rate burst"); end
    checks++; if (n_reset < 3)   begin failures++; $display("FAIL too few resets"); end
    checks++; if (n_impulse != M) begin failures++; $display("FAIL impulse phases %0d", n_impulse); end
    checks++; if (n_neg == 0)    begin failures++; $display("FAIL no negative output"); end
    $display("outputs=%0d idle_cycles=%0d bursts=%0d resets=%0d impulse_phases=%0d negative_outputs=%0d",
             n_out, n_idle, n_burst, n_reset, n_impulse, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
