// memory_access_unit: byte, halfword and word alignment for loads and
// stores.
//
// For a store it places the data on the byte lanes that the address
// selects (AHB little-endian lanes: byte n of the word at address bits
// [1:0] = n) by replicating the byte or halfword over the 32-bit write bus,
// and gives the AHB HSIZE. For a load it takes the addressed byte or
// halfword out of the 32-bit read word and sign- or zero-extends it (lb/lh
// sign-extend, lbu/lhu zero-extend). The load/store mnemonics follow the
// document; the byte order and the lane replication are this design's
// choices. Accesses are assumed naturally aligned. Combinational.
module memory_access_unit
  import sun32_pkg::*;
(
  input  size_e       size,
  input  logic        is_signed,
  input  logic [1:0]  addr_lo,
  input  logic [31:0] store_data,
  input  logic [31:0] bus_rdata,
  output logic [2:0]  hsize,
  output logic [31:0] bus_wdata,
  output logic [31:0] load_data
);
  logic [7:0]  b;
  logic [15:0] h;

  assign hsize = size;

  always_comb begin
    unique case (size)
      SZ_BYTE: bus_wdata = {4{store_data[7:0]}};
      SZ_HALF: bus_wdata = {2{store_data[15:0]}};
      default: bus_wdata = store_data;
    endcase
  end

  assign b = bus_rdata[8*addr_lo +: 8];
  assign h = addr_lo[1] ? bus_rdata[31:16] : bus_rdata[15:0];

  always_comb begin
    unique case (size)
      SZ_BYTE: load_data = is_signed ? {{24{b[7]}}, b} : {24'd0, b};
      SZ_HALF: load_data = is_signed ? {{16{h[15]}}, h} : {16'd0, h};
      default: load_data = bus_rdata;
    endcase
  end
endmodule
