// raster_counter: frame scan sequencer shared by reg_grow and nbr_addr_gen.
//
// On the rising edge of vsync it restarts the scan at line 0, column 0,
// address 1, in the read phase. While the scan is active every clock toggles
// the phase; after each write phase it steps to the next pixel, so the
// address Add = COLS*i + j + 1 advances by one every two clocks. After the
// last pixel of the frame it pulses frame_done for one clock and idles until
// the next vsync rising edge. Reset (synchronous, active low) leaves it idle.
//
// Restarting on the vsync rising edge and Add = COLS*i + j + 1 follow the
// source design; the two-clock pixel slot is this design's own choice.
//
// Timing: `start` is high in the clock where vsync is first seen high; the
// first read phase is the clock after it.
module raster_counter
  import regrow_pkg::*;
#(
  parameter int unsigned COLS = IMG_COLS,
  parameter int unsigned ROWS = IMG_ROWS,
  parameter int unsigned AW   = ADDR_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     vsync,
  output logic                     start,      // vsync rising edge seen
  output logic                     active,     // a frame scan is running
  output phase_e                   phase,
  output logic [$clog2(ROWS)-1:0]  row,        // i
  output logic [$clog2(COLS)-1:0]  col,        // j
  output logic [AW-1:0]            add,        // COLS*i + j + 1
  output logic                     frame_done  // one clock after the last write phase
);

  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned CW = $clog2(COLS);

  logic vsync_q;
  logic last_col, last_row;

  assign start    = vsync && !vsync_q;
  assign last_col = (col == CW'(COLS - 1));
  assign last_row = (row == RW'(ROWS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vsync_q    <= 1'b0;
      active     <= 1'b0;
      phase      <= PH_READ;
      row        <= '0;
      col        <= '0;
      add        <= AW'(1);
      frame_done <= 1'b0;
    end else begin
      vsync_q    <= vsync;
      frame_done <= 1'b0;
      if (start) begin
        active <= 1'b1;
        phase  <= PH_READ;
        row    <= '0;
        col    <= '0;
        add    <= AW'(1);
      end else if (active) begin
        if (phase == PH_READ) begin
          phase <= PH_WRITE;
        end else begin
          phase <= PH_READ;
          add   <= add + AW'(1);
          if (last_col) begin
            col <= '0;
            if (last_row) begin
              row        <= '0;
              active     <= 1'b0;
              frame_done <= 1'b1;
            end else begin
              row <= row + RW'(1);
            end
          end else begin
            col <= col + CW'(1);
          end
        end
      end
    end
  end

endmodule
