// tb_pwm_mapper: self-checking test of the PWM mapping table.
//
// Checks the M = 3 mapper against the 8-row mapping table written out by hand
// (word 5 -> b_1..b_8 = 11111000), and the M = 9 mapper at its default size
// over all 512 words against 2^w - 1, the value whose lowest w bits are set.
module tb_pwm_mapper;
  int checks = 0, failures = 0;

  logic [2:0] w3;
  logic [7:0] p3;
  logic [8:0] w9;
  logic [511:0] p9;

  pwm_mapper #(.M(3)) dut3 (.word(w3), .pwm(p3));
  pwm_mapper          dut9 (.word(w9), .pwm(p9));

  // Rows of the M = 3 table as b_1..b_8, b_1 leftmost.
  logic [7:0] table3 [8] = '{8'b00000000, 8'b10000000, 8'b11000000, 8'b11100000,
                             8'b11110000, 8'b11111000, 8'b11111100, 8'b11111110};

  function automatic logic [7:0] reverse8(input logic [7:0] v);
    for (int i = 0; i < 8; i++) reverse8[i] = v[7 - i];
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [511:0] exp9;
    for (int w = 0; w < 8; w++) begin
      w3 = 3'(w);
      #1;
      checks++;
      // pwm bit 0 is b_1, the table's leftmost column.
      if (p3 !== reverse8(table3[w])) begin
        failures++;
        $display("M=3 word %0d: got %b expected %b", w, p3, reverse8(table3[w]));
      end
    end
    for (int w = 0; w < 512; w++) begin
      w9 = 9'(w);
      exp9 = (512'(1) << w) - 512'(1);
      #1;
      checks++;
      if (p9 !== exp9 || $countones(p9) != w) begin
        failures++;
        $display("M=9 word %0d: %0d ones", w, $countones(p9));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
