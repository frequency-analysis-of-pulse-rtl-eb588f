// pwm_mapper: the PWM modulator, written as a mapping table.
//
// An M-bit input word w (0 .. 2^M-1) becomes a 2^M-bit PWM word whose first w
// bits are 1 and whose remaining bits are 0: a pulse whose duty cycle is
// w / 2^M.  Bit 0 of pwm is b_1, the bit sent first; so w = 5 with M = 3 gives
// b_1..b_8 = 1 1 1 1 1 0 0 0, and the largest word keeps the last bit at 0.
// This is the standard (unshuffled) PWM mapping of the modelled transmitter.
//
// Purely combinational: pwm follows word with no clock.
module pwm_mapper #(
  parameter int unsigned M = adt_pkg::M_DEFAULT,
  localparam int unsigned N = 1 << M
) (
  input  logic [M-1:0] word,
  output logic [N-1:0] pwm
);

  always_comb begin
    for (int unsigned k = 0; k < N; k++)
      pwm[k] = (k < 32'(word));
  end

endmodule
