// tb_quarter_rotator: multiplies random complex values by (-j)^q for all
// four q and compares with the complex product computed here from the
// definition (-j)^q = cos(q pi/2) - j sin(q pi/2), in integers.
module tb_quarter_rotator;
  localparam int unsigned W = 20;
  logic [1:0] quad;
  logic signed [W-1:0] in_re, in_im, out_re, out_im;
  int checks = 0, failures = 0;
  localparam int CR [4] = '{1, 0, -1, 0};
  localparam int CI [4] = '{0, -1, 0, 1};

  quarter_rotator #(.W(W)) dut (.*);

  initial begin
    for (int t = 0; t < 400; t++) begin
      int xr, xi, er, ei;
      xr = int'($urandom % (1 << (W - 1))) - (1 << (W - 2));
      xi = int'($urandom % (1 << (W - 1))) - (1 << (W - 2));
      quad  = 2'(t);
      in_re = W'(xr);
      in_im = W'(xi);
      #1;
      er = xr * CR[t % 4] - xi * CI[t % 4];
      ei = xr * CI[t % 4] + xi * CR[t % 4];
      checks++;
      if (int'(out_re) != er || int'(out_im) != ei) begin
        failures++;
        $display("q=%0d (%0d,%0d) -> (%0d,%0d), expected (%0d,%0d)", quad, xr, xi, out_re, out_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
