// frame_mem: 128K x 8 single-port pixel memory.
//
// Stands for the asynchronous SRAM chips of the system (image memory,
// auxiliary memory and neighbour memories N1..N4). Like such an SRAM it has a
// single address bus and a single R/W line: with rw = 1 the word at `add`
// appears on `dout` combinationally (asynchronous read); with rw = 0 the word
// on `din` is stored at `add` on the rising clock edge. The separate din/dout
// buses stand for the chip's bidirectional data pins. The contents are not
// reset; the system initialises them in a load frame before reading them.
//
// Size and the one-port interface follow the source design; writing on the
// clock edge rather than on a write strobe is this design's choice.
module frame_mem
  import regrow_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned DW = PIX_W
) (
  input  logic          clk,
  input  logic          rw,    // 1 = read, 0 = write
  input  logic [AW-1:0] add,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (!rw) mem[add] <= din;
  end

  assign dout = mem[add];

endmodule
