// adt_pkg: constants and helpers shared by the PWM all-digital transmitter.
//
// The transmitter turns random M-bit I and Q samples into a single one-bit
// stream: each sample becomes a 2^M-bit PWM word (thermometer code), the two
// PWM words are interleaved and partly inverted to emulate multiplication by
// a carrier, and the resulting 2^(M+1)-bit word is sent one bit per cycle of a
// clock running at four times the carrier frequency f_C.  One sample pair
// therefore lasts 2^(M+1) bit clocks, so the baseband rate is
// f_BB = 4 f_C / 2^(M+1).
//
// M = 9 is the resolution the transmitter is built for (the lowest one whose
// PWM harmonics sink into the noise floor); M = 4 is the second measured
// setting.  The memory depth and the random-number generator are this
// design's own choices.
package adt_pkg;

  // PWM resolution in bits.
  localparam int unsigned M_DEFAULT     = 9;
  // Words stored per channel in the communication-source memory.
  localparam int unsigned DEPTH_DEFAULT = 1024;
  // Default generator seeds of the I and Q memories (any non-zero value).
  localparam logic [31:0] SEED_I_DEFAULT = 32'h1D87_2B41;
  localparam logic [31:0] SEED_Q_DEFAULT = 32'h6A09_E667;

  // One carrier period is four output bits: X_I, X_Q, ~X_I, ~X_Q.
  localparam int unsigned BITS_PER_CARRIER = 4;

  // Length of the PWM word produced from one M-bit sample.
  function automatic int unsigned pwm_bits(input int unsigned m);
    return 1 << m;
  endfunction

  // Length of the serialized word covering one baseband step.
  function automatic int unsigned frame_bits(input int unsigned m);
    return 1 << (m + 1);
  endfunction

  // One step of a 32-bit Galois LFSR, polynomial x^32+x^22+x^2+x+1
  // (maximal length).  Fills the communication-source memories.
  function automatic logic [31:0] lfsr32_next(input logic [31:0] s);
    logic [31:0] n;
    n = s >> 1;
    if (s[0]) n = n ^ 32'h8020_0003;
    return n;
  endfunction

endpackage
