// cla32: 32-bit carry look-ahead adder.
//
// Computes sum = a + b + cin and the carry out. The adder is built from
// eight 4-bit look-ahead groups: inside a group every carry is formed from
// the bit generate/propagate terms, and the group carries ripple from one
// group to the next. The document names this block as part of the ALU; the
// group size and the group-ripple arrangement are this design's choice.
// Purely combinational.
module cla32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] sum,
  output logic        cout
);
  logic [31:0] g, p;
  logic [32:0] c;

  assign g = a & b;
  assign p = a ^ b;

  // carries out of bits 0..3 of one group from its generate/propagate terms
  // and the group carry-in, all in two levels of logic
  function automatic logic [3:0] group_carry(logic [3:0] gg, logic [3:0] pp, logic ci);
    group_carry[0] = gg[0] | (pp[0] & ci);
    group_carry[1] = gg[1] | (pp[1] & gg[0]) | (&pp[1:0] & ci);
    group_carry[2] = gg[2] | (pp[2] & gg[1]) | (&pp[2:1] & gg[0]) | (&pp[2:0] & ci);
    group_carry[3] = gg[3] | (pp[3] & gg[2]) | (&pp[3:2] & gg[1]) | (&pp[3:1] & gg[0])
                   | (&pp[3:0] & ci);
  endfunction

  assign c[0] = cin;
  for (genvar grp = 0; grp < 8; grp++) begin : g_grp
    assign c[4*grp+4 -: 4] = group_carry(g[4*grp +: 4], p[4*grp +: 4], c[4*grp]);
  end

  assign sum  = p ^ c[31:0];
  assign cout = c[32];
endmodule
