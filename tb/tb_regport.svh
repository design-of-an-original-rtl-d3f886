// Register-port driver tasks shared by the peripheral testbenches. They
// expect clk, reg_re, reg_we, reg_raddr, reg_waddr, reg_wdata and
// reg_rdata in the including module.
task automatic reg_write(input logic [11:0] a, input logic [31:0] d);
  @(negedge clk);
  reg_we = 1; reg_waddr = a; reg_wdata = d;
  @(negedge clk);
  reg_we = 0;
endtask
task automatic reg_read(input logic [11:0] a, output logic [31:0] d);
  @(negedge clk);
  reg_re = 1; reg_raddr = a;
  #1 d = reg_rdata;
  @(negedge clk);
  reg_re = 0;
endtask
