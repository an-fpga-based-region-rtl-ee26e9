// nbr_addr_gen: address generator for the four neighbour memories (CPLD2).
//
// Keeps its own raster scan, restarted by the vsync rising edge exactly like
// the one in reg_grow, so both stay in step without a shared address bus.
// For the pixel at Add = COLS*i + j + 1 it drives, in the read phase,
//   add1 = Add - COLS  (pixel above,  N1)
//   add2 = Add + 1     (pixel right,  N2)
//   add3 = Add + COLS  (pixel below,  N3)
//   add4 = Add - 1     (pixel left,   N4)
// and in the write phase all four equal Add, so the new auxiliary pixel is
// written into every copy at its own place. Arithmetic wraps modulo 2^AW;
// for border pixels the wrapped neighbour addresses are read but the
// result is never used, since border pixels of aux are 0.
//
// That a separate device addresses the neighbour memories, and the 17-bit
// width of Add1..Add4, follow the source design; the address arithmetic is
// the simplest one that yields the four 4-neighbours, and the write-phase
// switch follows from the two-clock pixel slot chosen for this design.
// The outputs are combinational from the scan registers. The scan's
// line, column and status outputs are not needed here and stay unread.
module nbr_addr_gen
  import regrow_pkg::*;
#(
  parameter int unsigned COLS = IMG_COLS,
  parameter int unsigned ROWS = IMG_ROWS,
  parameter int unsigned AW   = ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          vsync,
  output logic [AW-1:0] add1,
  output logic [AW-1:0] add2,
  output logic [AW-1:0] add3,
  output logic [AW-1:0] add4
);

  logic                    start, active, frame_done;
  phase_e                  phase;
  logic [$clog2(ROWS)-1:0] row;
  logic [$clog2(COLS)-1:0] col;
  logic [AW-1:0]           add;

  raster_counter #(.COLS(COLS), .ROWS(ROWS), .AW(AW)) u_scan (
    .clk, .rst_n, .vsync,
    .start, .active, .phase, .row, .col, .add, .frame_done
  );

  always_comb begin
    if (phase == PH_WRITE) begin
      add1 = add;
      add2 = add;
      add3 = add;
      add4 = add;
    end else begin
      add1 = add - AW'(COLS);
      add2 = add + AW'(1);
      add3 = add + AW'(COLS);
      add4 = add - AW'(1);
    end
  end

endmodule
