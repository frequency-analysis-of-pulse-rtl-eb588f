// serializer: parallel-to-serial stage of the transmitter.
//
// Sends a W-bit frame one bit per clock, bit 0 first.  The clock runs at the
// output bit rate, 4 f_C.  Following the FPGA prototype, where a multiplexer
// replaces a multi-gigabit transceiver, the current frame is held in a
// register and a bit counter selects the next output bit.  The output is
// registered so that the pin sees no mux glitches.
//
// Interface and timing:
//   load    high in the last bit slot of a frame.  At that edge word_in is
//           captured and its bit 0 is driven on tx_out; the other bits follow
//           on the next W-1 edges.  load therefore pulses once every W cycles.
//           It is the baseband clock step f_BB = f_bit / W, used by the
//           sources upstream to present the next frame.
//   tx_out  the serial output, each bit held for exactly one clock.
// After reset (active low, synchronous) tx_out is 0, the held frame is
// all-zero and the first load comes in the first cycle.  Those choices are
// this design's own.
module serializer #(
  parameter int unsigned W  = adt_pkg::frame_bits(adt_pkg::M_DEFAULT),
  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] word_in,
  output logic         load,
  output logic         tx_out
);

  logic [W-1:0]  word_q;
  logic [CW-1:0] cnt;

  assign load = (cnt == CW'(W - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word_q <= '0;
      cnt    <= CW'(W - 1);
      tx_out <= 1'b0;
    end else if (load) begin
      word_q <= word_in;
      cnt    <= '0;
      tx_out <= word_in[0];
    end else begin
      cnt    <= cnt + 1'b1;
      tx_out <= word_q[cnt + 1'b1];
    end
  end

  // A frame is loaded once every W cycles, never in two cycles running.
  if (W > 1) begin : g_chk
    a_load_spacing: assert property (@(posedge clk) disable iff (!rst_n)
      load |=> !load);
  end

endmodule
