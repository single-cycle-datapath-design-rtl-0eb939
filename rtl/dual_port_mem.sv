// dual_port_mem: word-addressable dual-port memory, 32-bit words.
//
// Two identical ports, each with a 32-bit address (ADDRn), write enable (WEn),
// output enable (OEn), write data (DATAn_IN) and read data (DATAn_OUT). The
// chip select CS switches the whole chip on or off.
//   * Write: CS=1, WEn=1: DATAn_IN is stored at ADDRn on the rising edge of CLK.
//   * Read:  CS=1, OEn=1, WEn=0: DATAn_OUT shows the word at ADDRn. Otherwise
//     DATAn_OUT is 0.
// Reads are combinational (the addressed word appears without waiting for a
// clock edge). This lets one clock cycle fetch an instruction on port 1 and
// complete a load on port 2, as a single-cycle processor needs; it departs from
// a memory whose reads, too, wait for the rising edge.
// If both ports write the same word on the same edge, port 2's data is kept.
// A write and a read of the same word on the same port cannot happen together
// (WEn=1 disables the read); a read on one port while the other writes that
// word shows the old word until the edge.
//
// Storage holds 2**MEM_AW words. The address ports keep their full 32 bits;
// only the low MEM_AW bits select a word, so with MEM_AW < 32 the address
// space wraps around. A full 2**32-word array exceeds what simulators and
// synthesis front ends accept, hence the smaller default.
// The bidirectional data pins of a classic RAM chip are split here into an
// input and an output bus per port.
module dual_port_mem #(
  parameter int unsigned MEM_AW = 28,   // words stored = 2**MEM_AW (32 for the full address space)
  parameter int unsigned DW     = 32,   // word width
  parameter int unsigned AW     = 32    // address port width
) (
  input  logic          clk,
  input  logic          cs,
  // port 1
  input  logic [AW-1:0] addr1,
  input  logic          we1,
  input  logic          oe1,
  input  logic [DW-1:0] data1_in,
  output logic [DW-1:0] data1_out,
  // port 2
  input  logic [AW-1:0] addr2,
  input  logic          we2,
  input  logic          oe2,
  input  logic [DW-1:0] data2_in,
  output logic [DW-1:0] data2_out
);

  localparam longint unsigned DEPTH = 64'd1 << MEM_AW;

  logic [DW-1:0] mem [DEPTH];

  logic [MEM_AW-1:0] idx1, idx2;
  assign idx1 = addr1[MEM_AW-1:0];
  assign idx2 = addr2[MEM_AW-1:0];

  always_ff @(posedge clk) begin
    if (cs && we1) mem[idx1] <= data1_in;
    if (cs && we2) mem[idx2] <= data2_in;
  end

  assign data1_out = (cs && oe1 && !we1) ? mem[idx1] : '0;
  assign data2_out = (cs && oe2 && !we2) ? mem[idx2] : '0;

endmodule
