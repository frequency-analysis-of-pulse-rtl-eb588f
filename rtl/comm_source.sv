// comm_source: the communication source of one transmitter channel (I or Q).
//
// A memory of DEPTH random M-bit integers, read out in address order, one
// word per baseband step.  The values are meant to be uniformly distributed
// over 0 .. 2^M-1.  Storing pre-computed random words in memory follows the
// transmitter being modelled; the depth and the way the contents are made are
// this design's own: at initialisation the memory is filled from a 32-bit
// maximal-length LFSR (adt_pkg::lfsr32_next) started at SEED and advanced 32
// steps per word, each word taking the low M bits of the state.  On an FPGA
// this becomes a ROM with initial contents.
//
// Interface and timing:
//   advance  one-cycle strobe, the baseband clock step.  At the edge where it
//            is high, data takes mem[addr] and addr steps on, wrapping from
//            DEPTH-1 to 0.
//   data     the current word, held for a whole baseband step.
//   addr     address of the word that the next advance will deliver.
// Reset (active low, synchronous) clears data to 0 and addr to 0.
module comm_source #(
  parameter int unsigned M     = adt_pkg::M_DEFAULT,
  parameter int unsigned DEPTH = adt_pkg::DEPTH_DEFAULT,
  parameter logic [31:0] SEED  = adt_pkg::SEED_I_DEFAULT,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          advance,
  output logic [M-1:0]  data,
  output logic [AW-1:0] addr
);

  logic [M-1:0] mem [DEPTH];

  initial begin : fill
    logic [31:0] s;
    s = SEED;
    for (int i = 0; i < DEPTH; i++) begin
      for (int k = 0; k < 32; k++) s = adt_pkg::lfsr32_next(s);
      mem[i] = s[M-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data <= '0;
      addr <= '0;
    end else if (advance) begin
      data <= mem[addr];
      addr <= (addr == AW'(DEPTH - 1)) ? '0 : addr + 1'b1;
    end
  end

endmodule
