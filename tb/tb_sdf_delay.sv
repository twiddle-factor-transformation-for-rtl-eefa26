// tb_sdf_delay: checks the feedback delay buffer against a queue model.
// Random words are written on random enable cycles; whenever the buffer is
// enabled and has been filled once, its head must equal the word written
// DEPTH enabled cycles earlier. Disabled cycles must not move it.
module tb_sdf_delay;
  localparam int unsigned DEPTH = 5;
  localparam int unsigned W     = 12;

  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];

  sdf_delay #(.DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      en  <= ($urandom % 3) != 0;
      din <= W'($urandom);
      #1;
      if (en) begin
        if (q.size() == DEPTH) begin
          checks++;
          if (dout !== q[0]) begin
            failures++;
            $display("t=%0d head %h expected %h", t, dout, q[0]);
          end
          void'(q.pop_front());
        end
        q.push_back(din);
      end
      @(posedge clk);
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
