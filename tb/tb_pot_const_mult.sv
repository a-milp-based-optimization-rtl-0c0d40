// tb_pot_const_mult - self-checking test of the shift-add constant multiplier.
//
// Eight multipliers with different constant words (coefficients of the
// 21-tap filter, the most negative word, zero, all ones and an alternating
// pattern) are driven with random and extreme 16-bit inputs. Every product
// is compared with the ordinary signed product computed in 64-bit integer
// arithmetic.
module tb_pot_const_mult;
  localparam int unsigned DW = 16;
  localparam int unsigned CW = 16;
  localparam int unsigned NC = 8;
  localparam logic [NC-1:0][CW-1:0] WORDS = {
    16'd65415, 16'd6958, 16'd6944, 16'd1248, 16'h8000, 16'h0000, 16'hFFFF, 16'h5555
  };

  logic signed [DW-1:0]    x;
  logic signed [DW+CW-1:0] p [NC];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NC; c++) begin : g_dut
    pot_const_mult #(.DATA_W(DW), .COEF_W(CW), .COEF(WORDS[c])) dut (.x(x), .p(p[c]));
  end

  task automatic check_all();
    longint exp;
    #1;
    for (int c = 0; c < NC; c++) begin
      exp = longint'(x) * longint'($signed(WORDS[c]));
      checks++;
      if (longint'(p[c]) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d coef=%0d got=%0d exp=%0d", x, $signed(WORDS[c]), p[c], exp);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 16'sh7FFF; check_all();
    x = 16'sh8000; check_all();
    x = 0;         check_all();
    x = -1;        check_all();
    x = 1;         check_all();
    repeat (500) begin
      x = DW'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
