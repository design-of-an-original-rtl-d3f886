// inc32: 32-bit incrementer for the program counter.
//
// Returns a + 4, the address of the next instruction word. Because the two
// low bits of a word-aligned PC are zero, the increment is done on bits
// [31:2] by a plain carry chain and the low bits pass through. The document
// names this block; its exact function (step of four bytes) is inferred
// from the word-aligned 32-bit instruction format. Combinational.
module inc32 (
  input  logic [31:0] a,
  output logic [31:0] y
);
  assign y = {a[31:2] + 30'd1, a[1:0]};
endmodule
