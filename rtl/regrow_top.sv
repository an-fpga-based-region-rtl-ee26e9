// regrow_top: region-growing system for binary images.
//
// Wires the block diagram of the system: the region-growing engine
// (reg_grow), the neighbour address generator (nbr_addr_gen), the image
// memory, the auxiliary memory and the four neighbour memories N1..N4, all
// 128K x 8 single-port memories (frame_mem).
//
//   video --> reg_grow --add/rw--> image mem, aux mem
//                      <--data_i-- image mem     <--data_a-- aux mem
//                      --data_a_wr--> aux mem, N1..N4
//             nbr_addr_gen --add1..add4--> N1..N4 --v1..v4--> reg_grow
//
// The video source (clock, vertical sync and monochrome pixels) and the
// digital-to-analog video output stage are outside this module: their
// signals are its ports. Operation: raise `load` before a vsync rising edge
// to store one frame of video and initialise the auxiliary image; then let
// vsync run with `load` low. Each frame is one region-growing pass; `out`
// streams the processed pixels (out_valid high), and `converged` is set at
// the end of the first pass that changed nothing, at which point the stream
// is the image with its enclosed holes filled.
//
// Timing: one pixel every two clocks, COLS*ROWS*2 clocks per pass after the
// clock that sees the vsync rising edge. At the default 320 x 240 this is
// 153,600 clocks, inside the 225,000 clocks a 60 frame/s field gives at the
// 13.5 MHz pixel clock.
module regrow_top
  import regrow_pkg::*;
#(
  parameter int unsigned COLS = IMG_COLS,
  parameter int unsigned ROWS = IMG_ROWS,
  parameter int unsigned AW   = ADDR_W,
  parameter int unsigned DW   = PIX_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          vsync,
  input  logic          load,
  input  logic [DW-1:0] video,
  output logic [DW-1:0] out,
  output logic          out_valid,
  output logic          frame_done,
  output logic          converged
);

  logic [AW-1:0] add, add1, add2, add3, add4;
  logic          rw;
  logic [DW-1:0] data_i, data_i_wr, data_a, data_a_wr;
  logic [DW-1:0] v1, v2, v3, v4;

  reg_grow #(.COLS(COLS), .ROWS(ROWS), .AW(AW), .DW(DW)) u_reg_grow (
    .clk, .rst_n, .vsync, .load, .video,
    .add, .rw,
    .data_i, .data_i_wr, .data_a, .data_a_wr,
    .v1, .v2, .v3, .v4,
    .out, .out_valid, .frame_done, .converged
  );

  nbr_addr_gen #(.COLS(COLS), .ROWS(ROWS), .AW(AW)) u_nbr_addr (
    .clk, .rst_n, .vsync, .add1, .add2, .add3, .add4
  );

  frame_mem #(.AW(AW), .DW(DW)) u_image_mem (
    .clk, .rw, .add, .din(data_i_wr), .dout(data_i));
  frame_mem #(.AW(AW), .DW(DW)) u_aux_mem (
    .clk, .rw, .add, .din(data_a_wr), .dout(data_a));
  frame_mem #(.AW(AW), .DW(DW)) u_mem_n1 (
    .clk, .rw, .add(add1), .din(data_a_wr), .dout(v1));
  frame_mem #(.AW(AW), .DW(DW)) u_mem_n2 (
    .clk, .rw, .add(add2), .din(data_a_wr), .dout(v2));
  frame_mem #(.AW(AW), .DW(DW)) u_mem_n3 (
    .clk, .rw, .add(add3), .din(data_a_wr), .dout(v3));
  frame_mem #(.AW(AW), .DW(DW)) u_mem_n4 (
    .clk, .rw, .add(add4), .din(data_a_wr), .dout(v4));

  // All four copies are written at the pixel's own address.
  a_copies_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    !rw |-> (add1 == add && add2 == add && add3 == add && add4 == add));

endmodule
