// tb_polyphase_subfilter - self-checking test of one direct-form branch.
//
// A 7-tap branch with the coefficients of branch 0 of the 21-tap filter
// (h[0], h[3], ..., h[18], not symmetric) is fed random low-rate samples with random gaps.
// A reference convolution over the samples accepted since reset gives each
// expected output, which must appear one clock after its input sample.
module tb_polyphase_subfilter;
  localparam int unsigned DW   = 16;
  localparam int unsigned CW   = 16;
  localparam int unsigned TAPS = 7;
  localparam int unsigned SW   = DW + CW + $clog2(TAPS);
  // Signed values of the branch coefficients, listed independently.
  localparam int HREF [TAPS] = '{-121, -852, 1248, 6416, 4968, -76, -636};
  localparam logic [TAPS-1:0][CW-1:0] WORDS = {
    16'd64900, 16'd65460, 16'd4968, 16'd6416, 16'd1248, 16'd64684, 16'd65415
  };

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] in_data = '0;
  logic out_valid;
  logic signed [SW-1:0] out_data;

  polyphase_subfilter #(.DATA_W(DW), .COEF_W(CW), .TAPS(TAPS), .COEF(WORDS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, outs = 0;
  int hist [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int cycles);
    longint e;
    int n;
    repeat (cycles) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) == 0);
      case ($urandom_range(0, 9))
        0:       in_data = 16'sh7FFF;
        1:       in_data = 16'sh8000;
        default: in_data = DW'($urandom);
      endcase
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != in_valid) begin
        failures++;
        $display("FAIL out_valid=%0b expected %0b", out_valid, in_valid);
      end
      if (in_valid) begin
        hist.push_back(int'(in_data));
        n = hist.size() - 1;
        e = 0;
        for (int i = 0; i < TAPS; i++)
          if (n - i >= 0) e += longint'(HREF[i]) * longint'(hist[n - i]);
        checks++;
        outs++;
        if (longint'(out_data) != e) begin
          failures++;
          $display("FAIL m=%0d out=%0d expected %0d", n, out_data, e);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(400);
    @(negedge clk) begin rst_n = 0; in_valid = 0; end
    @(negedge clk) rst_n = 1;
    hist.delete();
    run(400);
    checks++;
    if (outs < 100) begin failures++; $display("FAIL too few outputs %0d", outs); end
    $display("outputs=%0d", outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
