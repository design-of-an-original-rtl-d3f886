// fifo: ring buffer used by the UART sender and receiver.
//
// DEPTH entries of WIDTH bits (256 bytes by default, the document's UART
// buffer size) in an array addressed by a write pointer and a read
// pointer that wrap around. push stores wdata at the tail unless the
// buffer is full; pop drops the head unless it is empty; push and pop may
// come in the same cycle. rdata always shows the head entry
// (combinational read, valid while empty is low). count is the number of
// stored entries. DEPTH must be a power of two.
module fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 256
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [WIDTH-1:0]       wdata,
  input  logic                   pop,
  output logic [WIDTH-1:0]       rdata,
  output logic                   empty,
  output logic                   full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= wp + AW'(1);
      if (do_pop)  rp <= rp + AW'(1);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  initial assert (DEPTH == (1 << AW)) else $error("fifo DEPTH must be a power of two");
endmodule
