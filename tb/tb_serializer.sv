// tb_serializer: self-checking test of the parallel-to-serial stage.
//
// Two instances: W = 8 and the default W = 1024 (M = 9).  A new random frame
// is offered at every load.  The test checks that load comes exactly every W
// cycles, that tx_out sends the captured frame bit 0 first, one bit per cycle,
// starting the cycle after the load edge, and that the held frame is not
// disturbed by changes of word_in between loads.
module tb_serializer;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]    w8;
  logic [1023:0] w1k;
  logic          ld8, tx8, ld1k, tx1k;

  serializer #(.W(8)) dut8  (.clk, .rst_n, .word_in(w8),  .load(ld8),  .tx_out(tx8));
  serializer          dut1k (.clk, .rst_n, .word_in(w1k), .load(ld1k), .tx_out(tx1k));

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference for the W = 8 instance: the frame captured at the last load,
  // and the bit position expected on tx_out after each edge.
  logic [7:0]    exp8;
  int            pos8 = -1, last_ld8 = -1, frames8 = 0;
  logic [1023:0] exp1k;
  int            pos1k = -1, last_ld1k = -1, frames1k = 0;
  int            cyc = 0;

  task automatic new_words();
    w8 = 8'($urandom);
    for (int k = 0; k < 32; k++) w1k[32*k +: 32] = $urandom;
  endtask

  initial begin
    new_words();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (frames1k < 20) begin
      @(posedge clk);
      cyc++;
      #1;
      // W = 8 instance
      if (pos8 >= 0) begin
        checks++;
        if (tx8 !== exp8[pos8]) begin
          failures++; $display("W=8 cycle %0d: bit %0d got %b", cyc, pos8, tx8);
        end
        pos8++;
      end
      if (pos1k >= 0) begin
        checks++;
        if (tx1k !== exp1k[pos1k]) begin
          failures++; $display("W=1024 cycle %0d: bit %0d got %b", cyc, pos1k, tx1k);
        end
        pos1k++;
      end
      // Loads happen on the coming edge; note what will be captured.
      if (ld8) begin
        if (last_ld8 >= 0) begin
          checks++;
          if (cyc - last_ld8 != 8) begin
            failures++; $display("W=8 load period %0d", cyc - last_ld8);
          end
          if (pos8 != 8) begin
            failures++; $display("W=8 sent %0d bits", pos8);
          end
        end
        last_ld8 = cyc; exp8 = w8; pos8 = 0; frames8++;
      end
      if (ld1k) begin
        if (last_ld1k >= 0) begin
          checks++;
          if (cyc - last_ld1k != 1024 || pos1k != 1024) begin
            failures++; $display("W=1024 load period %0d, %0d bits", cyc - last_ld1k, pos1k);
          end
        end
        last_ld1k = cyc; exp1k = w1k; pos1k = 0; frames1k++;
      end
      // word_in keeps changing between loads; only the load edge counts.
      if (!ld8 && !ld1k) new_words();
    end
    checks++;
    if (frames8 < 2000) begin
      failures++; $display("only %0d W=8 frames", frames8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
