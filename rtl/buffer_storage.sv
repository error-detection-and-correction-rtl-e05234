// buffer_storage: the k-bit information buffer of the decoders.
//
// A DEPTH-stage shift register. While wr is high a received information bit
// enters at stage 0; while rd is high the bit at the far end (dout) is
// consumed and every stage moves one place on, a zero entering behind. After
// exactly DEPTH writes the oldest bit is at dout, so the bits leave in the
// order they arrived, one per read. wr and rd are never high together in the
// decoders; if they are, the shift happens once with din entering. dout is
// the registered far-end stage, valid combinationally in the read cycle.
// The document gives only the buffer's purpose; a shift register is this
// design's choice of the simplest structure for it.
module buffer_storage #(
  parameter int unsigned DEPTH = 265
) (
  input  logic clk,
  input  logic wr,
  input  logic din,
  input  logic rd,
  output logic dout
);

  logic [DEPTH-1:0] mem;

  initial assert (DEPTH >= 2) else $fatal(1, "buffer_storage needs DEPTH >= 2");

  always_ff @(posedge clk)
    if (wr || rd) mem <= {mem[DEPTH-2:0], wr & din};

  assign dout = mem[DEPTH-1];

endmodule
