// tb_cmult: random data times random twiddle words, compared with the exact
// complex product computed here in 64-bit integers and rounded to nearest
// (halves up) after dividing by 2^(TW-2). Checks the one-clock latency and
// that the result holds while `en` is low.
module tb_cmult;
  localparam int unsigned W  = 28;
  localparam int unsigned TW = 16;
  logic clk = 1'b0, en = 1'b0;
  logic signed [W-1:0]  a_re = '0, a_im = '0, p_re, p_im;
  logic signed [TW-1:0] b_re = '0, b_im = '0;
  int checks = 0, failures = 0;

  cmult #(.W(W), .TW(TW)) dut (.*);
  always #5 clk = ~clk;

  function automatic longint rdiv(longint v);   // round(v / 2^14), halves up
    return (v + (64'sd1 << (TW - 3))) >>> (TW - 2);
  endfunction

  initial begin
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      longint ar, ai, br, bi, er, ei;
      ar = longint'(int'($urandom % (1 << 26)) - (1 << 25));
      ai = longint'(int'($urandom % (1 << 26)) - (1 << 25));
      br = longint'(int'($urandom % 32769) - 16384);
      bi = longint'(int'($urandom % 32769) - 16384);
      a_re <= W'(ar); a_im <= W'(ai); b_re <= TW'(br); b_im <= TW'(bi);
      en <= 1'b1;
      @(posedge clk);
      en <= 1'b0;
      a_re <= '0;
      #1;
      er = rdiv(ar * br - ai * bi);
      ei = rdiv(ar * bi + ai * br);
      checks++;
      if (longint'(p_re) != er || longint'(p_im) != ei) begin
        failures++;
        $display("(%0d,%0d)*(%0d,%0d) = (%0d,%0d), expected (%0d,%0d)", ar, ai, br, bi, p_re, p_im, er, ei);
      end
      @(posedge clk);
      #1;
      checks++;
      if (longint'(p_re) != er) failures++;
    end
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
