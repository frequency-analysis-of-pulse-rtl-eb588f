// tb_comm_source: self-checking test of the communication-source memory.
//
// Instances: M = 4 with 1024 words, and M = 9 with 16 words.  A reference
// LFSR, written bit by bit from the polynomial x^32+x^22+x^2+x+1, predicts
// every word.  The test checks that words come out in address order only when
// advance is high, that the address wraps after the last word, and that the
// M = 4 contents are close to uniform (each value 64 +/- 24 times in 1024).
module tb_comm_source;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       adv = 0;
  logic [3:0] d4;
  logic [9:0] a4;
  logic [8:0] d9;
  logic [3:0] a9;

  localparam logic [31:0] S4 = 32'h0000_0001;
  localparam logic [31:0] S9 = 32'hCAFE_F00D;

  comm_source #(.M(4), .DEPTH(1024), .SEED(S4)) dut4 (.clk, .rst_n, .advance(adv), .data(d4), .addr(a4));
  comm_source #(.M(9), .DEPTH(16),   .SEED(S9)) dut9 (.clk, .rst_n, .advance(adv), .data(d9), .addr(a9));

  // Reference generator: right shift, feedback bit s[0] into bit 31 and
  // XORed into the tap bits 21, 1 and 0 of the shifted value.
  function automatic logic [31:0] step(input logic [31:0] s);
    logic [31:0] n;
    for (int i = 0; i < 31; i++) n[i] = s[i + 1];
    n[31] = s[0];
    n[21] = n[21] ^ s[0];
    n[1]  = n[1]  ^ s[0];
    n[0]  = n[0]  ^ s[0];
    return n;
  endfunction

  logic [3:0] ref4 [1024];
  logic [8:0] ref9 [16];
  int hist [16];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] s;
    s = S4;
    foreach (hist[v]) hist[v] = 0;
    for (int i = 0; i < 1024; i++) begin
      repeat (32) s = step(s);
      ref4[i] = s[3:0];
      hist[s[3:0]]++;
    end
    s = S9;
    for (int i = 0; i < 16; i++) begin
      repeat (32) s = step(s);
      ref9[i] = s[8:0];
    end
    for (int v = 0; v < 16; v++) begin
      checks++;
      if (hist[v] < 40 || hist[v] > 88) begin
        failures++; $display("value %0d occurs %0d times", v, hist[v]);
      end
    end

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (d4 !== 0 || a4 !== 0 || d9 !== 0 || a9 !== 0) begin
      failures++; $display("reset state wrong");
    end
    // 2100 advances with idle cycles in between: covers two wraps of the
    // M = 4 memory and many of the 16-word memory.
    for (int n = 0; n < 2100; n++) begin
      adv = 1;
      @(posedge clk); #1;
      adv = 0;
      checks++;
      if (d4 !== ref4[n % 1024] || a4 !== 10'((n + 1) % 1024)) begin
        failures++; $display("M=4 advance %0d: data %0d exp %0d addr %0d", n, d4, ref4[n % 1024], a4);
      end
      checks++;
      if (d9 !== ref9[n % 16] || a9 !== 4'((n + 1) % 16)) begin
        failures++; $display("M=9 advance %0d: data %0d exp %0d", n, d9, ref9[n % 16]);
      end
      // Idle cycles: nothing may change.
      repeat (n % 3) begin
        @(posedge clk); #1;
        checks++;
        if (d4 !== ref4[n % 1024] || d9 !== ref9[n % 16]) begin
          failures++; $display("data changed without advance");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
