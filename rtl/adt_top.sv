// adt_top: PWM-based all-digital transmitter (ADT).
//
// Everything from the data source to the output pin is digital:
//   comm_source (I), comm_source (Q)  random M-bit samples, one pair per
//                                     baseband step
//   pwm_mapper  (I), pwm_mapper  (Q)  each sample -> 2^M-bit PWM word
//   select_combine                    reorder to X_I X_Q ~X_I ~X_Q per
//                                     carrier period -> 2^(M+1)-bit frame
//   serializer                        one frame bit per clock on tx_out
// The only clock, clk_tx, is the output bit clock at 4 f_C.  It comes from
// the FPGA's PLL, which is outside this RTL.  The baseband step is not a
// second clock.  It is the serializer's load strobe, one cycle in every
// 2^(M+1), so f_BB = 4 f_C / 2^(M+1) as in the modelled transmitter: M = 4
// and f_C = 500 kHz (clk_tx = 2 MHz) give f_BB = 62.5 kHz, and M = 9 gives
// 1.953 kHz.  Using one clock with an enable where the original uses several
// PLL outputs is this design's own choice.
//
// Timing: at each load edge the serializer captures the frame built from the
// samples currently held by the sources, and the sources step to their next
// words.  The frame sent during baseband step p therefore comes from the
// samples read at step p-1.  The first frame after reset comes from the reset
// value 0 of both sources: all-zero PWM words, which give the bit pattern
// 0011 in every carrier period.
//
// Ports: clk_tx, rst_n (synchronous, active low), tx_out (the transmitted
// one-bit signal), bb_step (the baseband step strobe), and the I and Q
// samples of the frame being loaded, for observation.
module adt_top #(
  parameter int unsigned M      = adt_pkg::M_DEFAULT,
  parameter int unsigned DEPTH  = adt_pkg::DEPTH_DEFAULT,
  parameter logic [31:0] SEED_I = adt_pkg::SEED_I_DEFAULT,
  parameter logic [31:0] SEED_Q = adt_pkg::SEED_Q_DEFAULT,
  localparam int unsigned N     = 1 << M,
  localparam int unsigned F     = 2 * N,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk_tx,
  input  logic         rst_n,
  output logic         tx_out,
  output logic         bb_step,
  output logic [M-1:0] sample_i,
  output logic [M-1:0] sample_q
);

  logic [AW-1:0] addr_i, addr_q;
  logic [N-1:0]  pwm_i, pwm_q;
  logic [F-1:0]  frame;

  comm_source #(.M(M), .DEPTH(DEPTH), .SEED(SEED_I)) u_src_i (
    .clk(clk_tx), .rst_n, .advance(bb_step), .data(sample_i), .addr(addr_i)
  );

  comm_source #(.M(M), .DEPTH(DEPTH), .SEED(SEED_Q)) u_src_q (
    .clk(clk_tx), .rst_n, .advance(bb_step), .data(sample_q), .addr(addr_q)
  );

  pwm_mapper #(.M(M)) u_pwm_i (.word(sample_i), .pwm(pwm_i));
  pwm_mapper #(.M(M)) u_pwm_q (.word(sample_q), .pwm(pwm_q));

  select_combine #(.M(M)) u_sc (.pwm_i, .pwm_q, .frame);

  serializer #(.W(F)) u_ser (
    .clk(clk_tx), .rst_n, .word_in(frame), .load(bb_step), .tx_out
  );

  // Both sources step together, so their addresses never differ.
  a_addr_lockstep: assert property (@(posedge clk_tx) disable iff (!rst_n)
    addr_i == addr_q);

endmodule
