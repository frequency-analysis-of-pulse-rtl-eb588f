// select_combine: digital up-conversion by bit reordering.
//
// Multiplying the PWM signals by a carrier is replaced by reordering bits.
// Every carrier period is four output bits, X_I, X_Q, ~X_I, ~X_Q: two bits
// passed through and two inverted.  When the PWM bits are high this is the
// pattern 1100, a unipolar return-to-zero square wave at f_C.
//
// Each carrier period uses two consecutive bits of each PWM word: bit 2k is
// passed through and bit 2k+1 is inverted.  So the two 2^M-bit PWM words give
// one 2^(M+1)-bit frame, and the frame lasts 2^(M-1) carrier periods.  That
// is the frame length behind f_BB = 4 f_C / 2^(M+1).  With bit 0 sent first:
//   frame[4k+0] =  pwm_i[2k]      frame[4k+1] =  pwm_q[2k]
//   frame[4k+2] = ~pwm_i[2k+1]    frame[4k+3] = ~pwm_q[2k+1]
// Which pair of PWM bits goes into which carrier period is this design's own
// reading; the pattern of each group of four is the modelled transmitter's.
//
// Purely combinational.
module select_combine #(
  parameter int unsigned M = adt_pkg::M_DEFAULT,
  localparam int unsigned N = 1 << M,
  localparam int unsigned F = 2 * N
) (
  input  logic [N-1:0] pwm_i,
  input  logic [N-1:0] pwm_q,
  output logic [F-1:0] frame
);

  if (M < 1) begin : g_bad_m
    $error("select_combine: M must be at least 1");
  end

  always_comb begin
    for (int unsigned k = 0; k < N / 2; k++) begin
      frame[adt_pkg::BITS_PER_CARRIER*k + 0] =  pwm_i[2*k];
      frame[adt_pkg::BITS_PER_CARRIER*k + 1] =  pwm_q[2*k];
      frame[adt_pkg::BITS_PER_CARRIER*k + 2] = ~pwm_i[2*k + 1];
      frame[adt_pkg::BITS_PER_CARRIER*k + 3] = ~pwm_q[2*k + 1];
    end
  end

endmodule
