// tb_const_cmult: the constant multiplier for W_2048^1 (the constant that
// the modified radix-2^2 scheme leaves at its first position). With sel=1
// the output must be the data times cos(2 pi/2048) - j sin(2 pi/2048), the
// constant rounded to 2^14 and the product rounded to nearest, both computed
// here; with sel=0 the data must pass unchanged. One clock of latency.
module tb_const_cmult;
  localparam int unsigned W = 28, TW = 16, LOG2N = 11, EXP = 1;
  localparam real TWO_PI = 6.283185307179586;
  logic clk = 1'b0, en = 1'b0, sel = 1'b0;
  logic signed [W-1:0] in_re = '0, in_im = '0, out_re, out_im;
  int checks = 0, failures = 0, n_sel = 0;

  const_cmult #(.W(W), .TW(TW), .LOG2N(LOG2N), .EXP(EXP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    longint cr, ci;
    cr = longint'($floor(16384.0 * $cos(TWO_PI * EXP / 2048.0) + 0.5));
    ci = longint'($floor(-16384.0 * $sin(TWO_PI * EXP / 2048.0) + 0.5));
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      longint ar, ai, er, ei;
      bit s;
      ar = longint'(int'($urandom % (1 << 26)) - (1 << 25));
      ai = longint'(int'($urandom % (1 << 26)) - (1 << 25));
      s  = 1'($urandom);
      in_re <= W'(ar); in_im <= W'(ai); sel <= s; en <= 1'b1;
      @(posedge clk);
      en <= 1'b0;
      #1;
      if (s) begin
        er = (ar * cr - ai * ci + 8192) >>> 14;
        ei = (ar * ci + ai * cr + 8192) >>> 14;
        n_sel++;
      end else begin
        er = ar;
        ei = ai;
      end
      checks++;
      if (longint'(out_re) != er || longint'(out_im) != ei) begin
        failures++;
        $display("sel=%0d (%0d,%0d) -> (%0d,%0d), expected (%0d,%0d)", s, ar, ai, out_re, out_im, er, ei);
      end
    end
    checks++;
    if (n_sel == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
