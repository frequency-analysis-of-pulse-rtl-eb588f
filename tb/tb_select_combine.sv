// tb_select_combine: self-checking test of the up-conversion bit reordering.
//
// A hand-worked M = 2 case, the carrier patterns for constant PWM bits, and
// random PWM words at M = 9, the default.  The reference builds the frame
// position by position: position j is carrier period j/4, phase j%4.  Phases
// 0 and 1 carry I and Q bit 2*(j/4) unchanged, and phases 2 and 3 carry I and
// Q bit 2*(j/4)+1 inverted.
module tb_select_combine;
  int checks = 0, failures = 0;

  logic [3:0] i2, q2;
  logic [7:0] f2;
  logic [511:0] i9, q9;
  logic [1023:0] f9;

  select_combine #(.M(2)) dut2 (.pwm_i(i2), .pwm_q(q2), .frame(f2));
  select_combine          dut9 (.pwm_i(i9), .pwm_q(q9), .frame(f9));

  function automatic logic [1023:0] ref9(input logic [511:0] pi, input logic [511:0] pq);
    logic [1023:0] r;
    for (int j = 0; j < 1024; j++) begin
      int ph, b;
      logic v;
      ph = j % 4;
      b  = 2 * (j / 4) + ph / 2;
      v  = (ph % 2 == 0) ? pi[b] : pq[b];
      r[j] = (ph >= 2) ? ~v : v;
    end
    return r;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // I = word 2 (b_1 b_2 = 1 1), Q = word 1 (b_1 = 1).
    // Sent in order: 1 1 0 1 | 0 0 1 1
    i2 = 4'b0011; q2 = 4'b0001;
    #1; checks++;
    if (f2 !== 8'b1100_1011) begin
      failures++; $display("M=2 case: got %b", f2);
    end
    // All-ones PWM: every carrier period is 1 1 0 0 (RZ wave).
    i2 = '1; q2 = '1;
    #1; checks++;
    if (f2 !== 8'b0011_0011) begin
      failures++; $display("all ones: got %b", f2);
    end
    // All-zero PWM: every carrier period is 0 0 1 1.
    i2 = '0; q2 = '0;
    #1; checks++;
    if (f2 !== 8'b1100_1100) begin
      failures++; $display("all zeros: got %b", f2);
    end
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 16; k++) begin
        i9[32*k +: 32] = $urandom;
        q9[32*k +: 32] = $urandom;
      end
      #1; checks++;
      if (f9 !== ref9(i9, q9)) begin
        failures++; $display("M=9 random case %0d mismatch", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
