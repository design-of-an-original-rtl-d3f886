// gpio_led: LED output port of the SoC.
//
// One register at offset 0x0: writing sets the WIDTH LED outputs from
// bits [WIDTH-1:0], reading returns them. Resets to all off. The document
// shows an LED device on the bus but gives no details; width and register
// layout are this design's choices.
module gpio_led #(
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
  output logic [WIDTH-1:0] led
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              led <= '0;
    else if (reg_we && reg_waddr == 12'h000) led <= reg_wdata[WIDTH-1:0];
  end

  assign reg_rdata = (reg_raddr == 12'h000) ? 32'(led) : '0;

  logic unused;
  assign unused = reg_re;
endmodule
