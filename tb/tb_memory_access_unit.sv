// tb_memory_access_unit: byte and halfword extraction with sign and zero
// extension at every offset, store lane replication and HSIZE.
module tb_memory_access_unit;
  import sun32_pkg::*;
  `include "tb_check.svh"
  size_e size; logic is_signed; logic [1:0] addr_lo;
  logic [31:0] store_data, bus_rdata, bus_wdata, load_data; logic [2:0] hsize;
  memory_access_unit dut (.*);
  initial begin
    logic [31:0] exp_l, exp_w; logic [7:0] bb; logic [15:0] hh;
    for (int i = 0; i < 2000; i++) begin
      size = size_e'(i % 3); is_signed = i[2]; addr_lo = 2'($urandom);
      if (size == SZ_HALF) addr_lo[0] = 0;
      if (size == SZ_WORD) addr_lo = 0;
      store_data = $urandom; bus_rdata = $urandom;
      #1;
      bb = bus_rdata >> (8 * addr_lo); hh = bus_rdata >> (8 * addr_lo);
      case (size)
        SZ_BYTE: begin exp_l = is_signed ? 32'($signed(bb)) : 32'(bb); exp_w = {4{store_data[7:0]}}; end
        SZ_HALF: begin exp_l = is_signed ? 32'($signed(hh)) : 32'(hh); exp_w = {2{store_data[15:0]}}; end
        default: begin exp_l = bus_rdata; exp_w = store_data; end
      endcase
      `CHECK_EQ(load_data, exp_l, "load data")
      `CHECK_EQ(bus_wdata, exp_w, "store lanes")
      `CHECK_EQ(hsize, 3'(size), "hsize")
    end
    `TB_END
  end
  initial begin #100000; failures++; `TB_END end
endmodule
