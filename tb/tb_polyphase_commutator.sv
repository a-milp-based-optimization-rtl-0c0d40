// tb_polyphase_commutator - self-checking test of the delay chain and
// downsamplers.
//
// Random samples are presented with random idle cycles (in_valid low) and
// one reset in the middle of the stream. A reference keeps the history of
// accepted samples since reset; every phase-0 sample n (n a multiple of M)
// must produce exactly one frame right after the clock edge that accepted it
// (one clock of latency) with frame[k] = x[n-k] (zero before reset), and no
// frame may appear at any other time.
module tb_polyphase_commutator;
  localparam int unsigned DW = 16;
  localparam int unsigned M  = 3;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] in_data = '0;
  logic frame_valid;
  logic signed [DW-1:0] frame [M];

  polyphase_commutator #(.DATA_W(DW), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, frames = 0, idles = 0;
  int hist [$];          // samples accepted since reset, hist[n] = x[n]

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int cycles);
    bit exp_frame;
    int n;
    repeat (cycles) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = DW'($urandom);
      @(posedge clk);
      #1;
      exp_frame = 0;
      if (in_valid) begin
        hist.push_back(int'(in_data));
        n = hist.size() - 1;
        exp_frame = (n % M == 0);
      end else idles++;
      checks++;
      if (frame_valid != exp_frame) begin
        failures++;
        $display("FAIL frame_valid=%0b expected %0b at t=%0t", frame_valid, exp_frame, $time);
      end else if (exp_frame) begin
        frames++;
        for (int k = 0; k < M; k++) begin
          int e;
          e = (n - k >= 0) ? hist[n - k] : 0;
          checks++;
          if (int'(frame[k]) != e) begin
            failures++;
            $display("FAIL n=%0d frame[%0d]=%0d expected %0d", n, k, frame[k], e);
          end
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(300);
    @(negedge clk) begin rst_n = 0; in_valid = 0; end
    @(negedge clk) rst_n = 1;
    hist.delete();
    run(300);
    checks++;
    if (frames < 100) begin failures++; $display("FAIL too few frames %0d", frames); end
    checks++;
    if (idles == 0) begin failures++; $display("FAIL no idle cycles exercised"); end
    $display("frames=%0d idle_cycles=%0d", frames, idles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
