// gpio_sw: switch input port of the SoC.
//
// The WIDTH switch inputs are synchronised by two flip-flops and read at
// offset 0x0 in bits [WIDTH-1:0]; writes have no effect. The document
// shows a SW device on the bus but gives no details; width, synchroniser
// and register layout are this design's choices.
module gpio_sw #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             reg_re,
  input  logic             reg_we,
  input  logic [11:0]      reg_raddr,
  input  logic [11:0]      reg_waddr,
  input  logic [31:0]      reg_wdata,
  output logic [31:0]      reg_rdata,
  input  logic [WIDTH-1:0] sw
);
  logic [WIDTH-1:0] s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= sw;
      s2 <= s1;
    end
  end

  assign reg_rdata = (reg_raddr == 12'h000) ? 32'(s2) : '0;

  logic unused;
  assign unused = ^{reg_re, reg_we, reg_waddr, reg_wdata};
endmodule
