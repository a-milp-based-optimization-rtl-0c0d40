// tb_branch_sum - self-checking test of the branch output adder.
//
// Three random 35-bit signed branch values (including the extremes) are
// presented with random valid strobes; the registered 37-bit sum must equal
// the reference sum one clock later and hold while in_valid is low.
module tb_branch_sum;
  localparam int unsigned IW = 35;
  localparam int unsigned M  = 3;
  localparam int unsigned OW = IW + $clog2(M);

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IW-1:0] in_data [M];
  logic out_valid;
  logic signed [OW-1:0] out_data;

  branch_sum #(.IN_W(IW), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint held = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [IW-1:0] rnd();
    case ($urandom_range(0, 5))
      0:       return {1'b0, {(IW-1){1'b1}}};
      1:       return {1'b1, {(IW-1){1'b0}}};
      default: return IW'({$urandom, $urandom});
    endcase
  endfunction

  initial begin
    for (int k = 0; k < M; k++) in_data[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (1000) begin
      longint e;
      @(negedge clk);
      in_valid = $urandom_range(0, 1) == 1;
      e = 0;
      for (int k = 0; k < M; k++) begin
        in_data[k] = rnd();
        e += longint'(in_data[k]);
      end
      @(posedge clk);
      #1;
      if (in_valid) held = e;
      checks++;
      if (out_valid != in_valid || longint'(out_data) != held) begin
        failures++;
        $display("FAIL valid=%0b out=%0d expected %0d", out_valid, out_data, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
