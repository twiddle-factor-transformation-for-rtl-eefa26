// tb_sdf_stage: checks one radix-2 DIF SDF butterfly stage (16 points,
// stage 2, feedback delay 4) against the butterfly worked out from the
// input stream. For every block of 2D = 8 inputs x[0..7] the stage must
// output x[m]+x[m+4] at positions m = 0..3 and x[m]-x[m+4] at positions
// 4..7, in that order, D inputs later, with `out_idx` counting positions
// modulo 16. Input bubbles are inserted at random; the first valid output
// must be the first butterfly sum.
module tb_sdf_stage;
  localparam int unsigned LOG2N = 4;
  localparam int unsigned STAGE = 2;
  localparam int unsigned W     = 16;
  localparam int unsigned D     = 1 << (LOG2N - STAGE);
  localparam int unsigned NS    = 96;     // samples streamed

  logic                clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0] in_re = '0, in_im = '0, out_re, out_im;
  logic                out_valid;
  logic [LOG2N-1:0]    out_idx;
  int checks = 0, failures = 0, n_out = 0, stalls = 0;
  int xr [NS], xi [NS];

  sdf_stage #(.LOG2N(LOG2N), .STAGE(STAGE), .W(W)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk)
    if (rst_n && out_valid) begin
      int blk, m, er, ei;
      blk = (n_out / (2 * D)) * 2 * D;
      m   = n_out % (2 * D);
      if (m < D) begin
        er = xr[blk + m] + xr[blk + m + D];
        ei = xi[blk + m] + xi[blk + m + D];
      end else begin
        er = xr[blk + m - D] - xr[blk + m];
        ei = xi[blk + m - D] - xi[blk + m];
      end
      checks++;
      if (out_re != W'(er) || out_im != W'(ei) || out_idx != LOG2N'(n_out)) begin
        failures++;
        $display("out %0d: got (%0d,%0d) idx %0d, expected (%0d,%0d) idx %0d",
                 n_out, out_re, out_im, out_idx, er, ei, n_out % (1 << LOG2N));
      end
      n_out++;
    end

  initial begin
    for (int i = 0; i < NS; i++) begin
      xr[i] = int'($urandom % 4096) - 2048;
      xi[i] = int'($urandom % 4096) - 2048;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < NS; i++) begin
      if ($urandom % 3 == 0) begin
        in_valid <= 1'b0;
        stalls++;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_re <= W'(xr[i]);
      in_im <= W'(xi[i]);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != NS - D) begin
      failures++;
      $display("%0d outputs, expected %0d", n_out, NS - D);
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * 3 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
