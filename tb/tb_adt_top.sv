// tb_adt_top: end-to-end test of the transmitter at its default size.
//
// M = 9 (1024-bit frames, f_BB = f_bit / 1024) with 1024-word source
// memories.  The run covers 1030 baseband steps, a little over one full pass
// through the memories, so the address wrap is exercised.  adt_tx_checker
// predicts every output bit and the exact spacing of the baseband steps, and
// counts a failure for any mechanism that never occurred.
module tb_adt_top;
  localparam int FRAMES = 1030;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       tx_out, bb_step;
  logic [8:0] sample_i, sample_q;

  adt_top dut (.clk_tx(clk), .rst_n, .tx_out, .bb_step, .sample_i, .sample_q);

  adt_tx_checker #(.M(9), .DEPTH(1024)) chk (.clk, .rst_n, .tx_out, .bb_step, .sample_i, .sample_q);

  initial begin : watchdog
    repeat ((FRAMES + 10) * 1024) @(posedge clk);
    chk.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (chk.frames_done >= FRAMES);
    chk.final_checks();
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end
endmodule
