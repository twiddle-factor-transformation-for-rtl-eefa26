// tb_twiddle_rom: reads every entry of a compact twiddle table (2048
// points, live exponent bits 1, 2, 4 and 8, so 16 entries) and compares it
// with cos(2 pi e/N) and -sin(2 pi e/N) scaled by 2^14, where e is rebuilt
// here from the address bits. Rounding may differ by one LSB. Also checks
// the one-clock read latency and that the word holds while `en` is low.
module tb_twiddle_rom;
  import tft_pkg::*;
  localparam int unsigned LOG2N = 11;
  localparam int unsigned TW    = 16;
  localparam bit_mask_t   LIVE  = 16'h0116;
  localparam int          BITS [4] = '{1, 2, 4, 8};
  localparam real         TWO_PI = 6.283185307179586;

  logic clk = 1'b0, en = 1'b0;
  logic [3:0] addr = '0;
  logic signed [TW-1:0] tw_re, tw_im;
  int checks = 0, failures = 0;

  twiddle_rom #(.LOG2N(LOG2N), .TW(TW), .LIVE(LIVE)) dut (.*);
  always #5 clk = ~clk;

  function automatic bit near(int a, real b);
    return (real'(a) - b <= 1.0) && (b - real'(a) <= 1.0);
  endfunction

  initial begin
    @(posedge clk);
    for (int a = 0; a < 16; a++) begin
      int e;
      real c, s;
      e = 0;
      for (int b = 0; b < 4; b++) if ((a >> b) & 1) e += 1 << BITS[b];
      c = 16384.0 * $cos(TWO_PI * e / 2048.0);
      s = -16384.0 * $sin(TWO_PI * e / 2048.0);
      addr <= 4'(a);
      en   <= 1'b1;
      @(posedge clk);
      en   <= 1'b0;
      addr <= 4'(a + 5);
      #1;
      checks++;
      if (!near(int'(tw_re), c) || !near(int'(tw_im), s)) begin
        failures++;
        $display("addr %0d (e=%0d): (%0d,%0d) expected (%f,%f)", a, e, tw_re, tw_im, c, s);
      end
      @(posedge clk);
      #1;
      checks++;
      if (!near(int'(tw_re), c)) failures++;   // held while disabled
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
