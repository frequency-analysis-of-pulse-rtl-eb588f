// tb_adt_top_m4: end-to-end test of the transmitter at the M = 4 setting.
//
// M = 4 gives 32-bit frames, so f_BB = f_bit / 32: with f_bit = 4 x 500 kHz
// that is 62.5 kHz.  The source memories are cut to 64 words so that 300
// baseband steps wrap them several times.  adt_tx_checker predicts every
// output bit and the exact spacing of the baseband steps.
module tb_adt_top_m4;
  localparam int FRAMES = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       tx_out, bb_step;
  logic [3:0] sample_i, sample_q;

  adt_top #(.M(4), .DEPTH(64)) dut (.clk_tx(clk), .rst_n, .tx_out, .bb_step, .sample_i, .sample_q);

  adt_tx_checker #(.M(4), .DEPTH(64)) chk (.clk, .rst_n, .tx_out, .bb_step, .sample_i, .sample_q);

  initial begin : watchdog
    repeat ((FRAMES + 10) * 32) @(posedge clk);
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
