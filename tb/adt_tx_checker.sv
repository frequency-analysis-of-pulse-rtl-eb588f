// adt_tx_checker: reference model and scoreboard for adt_top.
//
// Watches the transmitter's output and predicts every bit of it on its own:
// it regenerates the two source memories with a bit-level LFSR, forms the
// thermometer PWM bits arithmetically (bit b of a sample w is 1 when b < w),
// and builds each carrier period as I, Q, ~I, ~Q from PWM bits 2k and 2k+1.
// Frame p carries the samples read at baseband step p-1, and frame 0, sent
// straight after reset, carries two zero samples.
//
// It also counts what the test must have exercised: baseband steps, wraps of
// the source memories, and each of the four carrier-period patterns (1100 is
// the plain RZ carrier, 0011 its inverse, and 1001 and 0110 are the periods
// where the I and Q pulses end at different bits).
module adt_tx_checker #(
  parameter int unsigned M      = 9,
  parameter int unsigned DEPTH  = 1024,
  parameter logic [31:0] SEED_I = 32'h1D87_2B41,
  parameter logic [31:0] SEED_Q = 32'h6A09_E667
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tx_out,
  input  logic         bb_step,
  input  logic [M-1:0] sample_i,
  input  logic [M-1:0] sample_q
);
  localparam int F = 2 << M;

  int checks = 0, failures = 0;
  int steps = 0, wraps = 0;
  int pat_count [16];
  int frames_done = 0;

  logic [M-1:0] mem_i [DEPTH];
  logic [M-1:0] mem_q [DEPTH];

  function automatic logic [31:0] step(input logic [31:0] s);
    logic [31:0] n;
    for (int i = 0; i < 31; i++) n[i] = s[i + 1];
    n[31] = s[0];
    n[21] = n[21] ^ s[0];
    n[1]  = n[1]  ^ s[0];
    n[0]  = n[0]  ^ s[0];
    return n;
  endfunction

  initial begin
    logic [31:0] si, sq;
    si = SEED_I; sq = SEED_Q;
    foreach (pat_count[k]) pat_count[k] = 0;
    for (int i = 0; i < DEPTH; i++) begin
      repeat (32) begin si = step(si); sq = step(sq); end
      mem_i[i] = si[M-1:0];
      mem_q[i] = sq[M-1:0];
    end
  end

  function automatic logic exp_bit(input int wi, input int wq, input int j);
    int ph, b;
    logic v;
    ph = j % 4;
    b  = 2 * (j / 4) + ph / 2;
    v  = (ph % 2 == 0) ? (b < wi) : (b < wq);
    return (ph >= 2) ? ~v : v;
  endfunction

  // State of the prediction: the samples of the frame now on the wire, the
  // bit position within it, and the next memory address.
  int  cur_i = 0, cur_q = 0, pos = -1, rd = 0, last_step = -1, cyc = 0;
  logic [3:0] group;

  always @(posedge clk) begin
    if (!rst_n) begin
      pos <= -1; rd <= 0; cur_i <= 0; cur_q <= 0; last_step <= -1; cyc <= 0;
    end else begin
      cyc <= cyc + 1;
      // tx_out now shows the bit chosen at the previous edge.
      if (pos >= 0) begin
        checks++;
        if (tx_out !== exp_bit(cur_i, cur_q, pos)) begin
          failures++;
          if (failures < 10)
            $display("frame %0d bit %0d: got %b", frames_done, pos, tx_out);
        end
        group[pos % 4] = tx_out;
        if (pos % 4 == 3) pat_count[group]++;
      end
      if (bb_step) begin
        // This edge loads the frame of the samples held now.
        checks++;
        if (32'(sample_i) != ((steps == 0) ? 0 : 32'(mem_i[(rd + DEPTH - 1) % DEPTH])) ||
            32'(sample_q) != ((steps == 0) ? 0 : 32'(mem_q[(rd + DEPTH - 1) % DEPTH]))) begin
          failures++;
          $display("step %0d: samples %0d/%0d differ from memory", steps, sample_i, sample_q);
        end
        if (last_step >= 0) begin
          checks++;
          if (cyc - last_step != F || pos != F - 1) begin
            failures++;
            $display("baseband step after %0d cycles, %0d bits", cyc - last_step, pos + 1);
          end
          frames_done++;
        end
        last_step <= cyc;
        cur_i <= int'(sample_i);
        cur_q <= int'(sample_q);
        pos   <= 0;
        if (steps > 0 && rd == DEPTH - 1) wraps++;
        rd    <= (steps == 0) ? 1 : (rd + 1) % DEPTH;
        steps++;
      end else if (pos >= 0) begin
        pos <= pos + 1;
      end
    end
  end

  // Counts a failure for each mechanism that never happened.
  task automatic final_checks();
    checks++; if (steps < 2)           begin failures++; $display("no baseband steps"); end
    checks++; if (wraps < 1)           begin failures++; $display("source memory never wrapped"); end
    checks++; if (pat_count[4'b0011] < 1) begin failures++; $display("carrier period 1100 never sent"); end
    checks++; if (pat_count[4'b1100] < 1) begin failures++; $display("carrier period 0011 never sent"); end
    checks++; if (pat_count[4'b1001] < 1) begin failures++; $display("carrier period 1001 never sent"); end
    checks++; if (pat_count[4'b0110] < 1) begin failures++; $display("carrier period 0110 never sent"); end
    $display("baseband steps %0d, memory wraps %0d, periods 1100:%0d 0011:%0d 1001:%0d 0110:%0d",
             steps, wraps, pat_count[4'b0011], pat_count[4'b1100], pat_count[4'b1001], pat_count[4'b0110]);
  endtask
endmodule
