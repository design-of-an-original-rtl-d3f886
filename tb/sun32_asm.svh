// Tiny sun32 assembler for the testbenches. The including module gets a
// program buffer prog[] (word addressed from byte address 0) and an emit
// pointer; the functions below encode the instruction formats described in
// sun32_pkg and append them. Branch offsets count words from the branch.
logic [31:0] prog [8192];
int          at = 0;   // word index of the next instruction

function automatic void emit(logic [31:0] w);
  prog[at] = w;
  at++;
endfunction
function automatic logic [31:0] enc_r(logic [6:0] op, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
  return {op, rd, rs1, rs2, 10'd0};
endfunction
function automatic logic [31:0] enc_i(logic [6:0] op, logic [4:0] rd, logic [4:0] rs1, logic [13:0] imm);
  return {op, rd, rs1, 1'b0, imm};
endfunction
function automatic logic [31:0] enc_u(logic [6:0] op, logic [4:0] rd, logic [17:0] imm);
  return {op, rd, 2'b00, imm};
endfunction
function automatic logic [31:0] enc_j(logic [6:0] op, int off_words);
  return {op, 25'(off_words)};
endfunction
// ldh/ldl pair: load a 32-bit constant
function automatic void li(logic [4:0] rd, logic [31:0] v);
  emit(enc_u(7'h2C, rd, v[31:14]));          // lui  rd, v[31:14]
  emit(enc_i(7'h1C, rd, rd, v[13:0]));       // ori  rd, rd, v[13:0]
endfunction
// branch/call from the current position to word index target
function automatic void br(logic [6:0] op, int target);
  emit(enc_j(op, target - at));
endfunction
