// sdf_delay: the feedback delay buffer of one single-path delay feedback
// (SDF) stage.
//
// A DEPTH-word first-in first-out delay built as a circular buffer: one
// memory array and one pointer. While `en` is high the word at the pointer is
// presented on `dout` (it was written DEPTH enabled cycles earlier) and is
// replaced by `din` at the clock edge; the pointer then advances and wraps at
// DEPTH. `dout` is a combinational read of the current head, so the owning
// butterfly sees the delayed sample in the same cycle as the new input.
// The memory is not reset: its first DEPTH outputs after reset are
// meaningless and the owning stage marks them invalid. The delay length
// 2^(n-i) at stage i is the usual SDF choice; building it as an addressed
// memory rather than a shift register is this design's choice.
module sdf_delay #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 56
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)
      ptr <= '0;
    else if (en)
      ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + AW'(1);

  always_ff @(posedge clk)
    if (en) mem[ptr] <= din;
endmodule
