// reg_grow: region-growing engine (the "Reg. Grow" FPGA block).
//
// Fills the holes of objects in a binary image by erosion of an auxiliary
// image from the image border inwards. The auxiliary image starts as 0 on the
// outer border and 255 inside. Each frame pass visits every pixel once, in
// raster order, and applies the rule
//
//   if aux(x,y) != 0 and bin(x,y) == 0 and any of aux(x,y-1), aux(x+1,y),
//      aux(x,y+1), aux(x-1,y) is 0   then aux(x,y) := 0
//   otherwise                             aux(x,y) keeps its value.
//
// Background reachable from the border is thus cleared pass after pass,
// while object pixels and holes enclosed by the object stay at 255. Passes
// are repeated, one per vsync, until a pass changes no pixel; then aux is the
// filled image. The rule, the raster addressing and the repeat-per-vsync
// come from the source design.
//
// Datapath. The binary image (bin) and the auxiliary image (aux) each sit in
// a single-port memory addressed by `add`. To read the four neighbours in the
// same cycle, aux is also kept in four copies N1..N4, addressed by the
// neighbour address generator: V1 = aux(x,y-1), V2 = aux(x+1,y),
// V3 = aux(x,y+1), V4 = aux(x-1,y). Each pixel takes two clocks:
//   read phase  (rw = 1): bin, aux and V1..V4 are read; the new aux value is
//                         computed and registered;
//   write phase (rw = 0): the new value is written at `add` into aux and into
//                         N1..N4 (whose address generator then also points
//                         at `add`); bin is written back unchanged. `out`
//                         carries the new pixel and out_valid is high.
// Because values are written back at once, a cleared pixel is seen by its
// right and lower neighbours in the same pass.
//
// Modes. `load` is sampled at the vsync rising edge. A load frame stores the
// incoming monochrome video into the image memory (0 = background) and writes
// the initial auxiliary image (0 on the border, 255 inside) into aux and
// N1..N4. A grow frame is one region-growing pass. The two-clock pixel slot,
// the load frame and the convergence flag are this design's own choices;
// the source design names the image loading and initialisation but does not
// say how they are done.
//
// Status. frame_done pulses for one clock after the last pixel of any frame,
// COLS*ROWS*2 clocks after the clock that saw the vsync rising edge;
// converged changes at the same clock edge: it is set after a grow pass that changed nothing and cleared
// by a pass that changed something or by a load frame.
module reg_grow
  import regrow_pkg::*;
#(
  parameter int unsigned COLS = IMG_COLS,
  parameter int unsigned ROWS = IMG_ROWS,
  parameter int unsigned AW   = ADDR_W,
  parameter int unsigned DW   = PIX_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          vsync,       // vertical sync from the video source
  input  logic          load,        // sampled at vsync rise: 1 = load frame
  input  logic [DW-1:0] video,       // monochrome video pixel (load frames)
  // image memory and auxiliary memory share `add` and `rw`
  output logic [AW-1:0] add,
  output logic          rw,          // 1 = read, 0 = write (all six memories)
  input  logic [DW-1:0] data_i,      // image memory read data
  output logic [DW-1:0] data_i_wr,   // image memory write data
  input  logic [DW-1:0] data_a,      // auxiliary memory read data
  output logic [DW-1:0] data_a_wr,   // aux and N1..N4 write data
  input  logic [DW-1:0] v1,          // aux(x, y-1) from N1
  input  logic [DW-1:0] v2,          // aux(x+1, y) from N2
  input  logic [DW-1:0] v3,          // aux(x, y+1) from N3
  input  logic [DW-1:0] v4,          // aux(x-1, y) from N4
  output logic [DW-1:0] out,         // processed pixel
  output logic          out_valid,
  output logic          frame_done,
  output logic          converged
);

  localparam logic [DW-1:0] ON = '1;

  logic                    start, active;
  phase_e                  phase;
  logic [$clog2(ROWS)-1:0] row;
  logic [$clog2(COLS)-1:0] col;
  mode_e                   mode;

  raster_counter #(.COLS(COLS), .ROWS(ROWS), .AW(AW)) u_scan (
    .clk, .rst_n, .vsync,
    .start, .active, .phase, .row, .col, .add, .frame_done
  );

  // ---- region-growing criterion (read phase, combinational) ----
  logic          nbr_bg;      // some 4-neighbour is background in aux
  logic [DW-1:0] aux_next;
  logic          border;
  logic          last_px;     // write phase of the frame's last pixel

  assign nbr_bg   = (v1 == '0) || (v2 == '0) || (v3 == '0) || (v4 == '0);
  assign aux_next = ((data_a != '0) && (data_i == '0) && nbr_bg) ? '0 : data_a;
  assign border   = (row == '0) || (row == ($clog2(ROWS))'(ROWS - 1)) ||
                    (col == '0) || (col == ($clog2(COLS))'(COLS - 1));
  assign last_px  = active && (phase == PH_WRITE) &&
                    (row == ($clog2(ROWS))'(ROWS - 1)) && (col == ($clog2(COLS))'(COLS - 1));

  // ---- registers between the read and the write phase ----
  logic [DW-1:0] bin_q, aux_q;
  logic          changed;     // some pixel changed in this grow pass

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode      <= MODE_GROW;
      bin_q     <= '0;
      aux_q     <= '0;
      changed   <= 1'b0;
      converged <= 1'b0;
    end else begin
      if (start) begin
        mode    <= load ? MODE_LOAD : MODE_GROW;
        changed <= 1'b0;
      end else if (active && phase == PH_READ) begin
        if (mode == MODE_LOAD) begin
          bin_q <= video;
          aux_q <= border ? '0 : ON;
        end else begin
          bin_q <= data_i;
          aux_q <= aux_next;
          if (aux_next != data_a) changed <= 1'b1;
        end
      end
      if (last_px) converged <= (mode == MODE_GROW) && !changed;
    end
  end

  assign rw        = !(active && phase == PH_WRITE);
  assign data_i_wr = bin_q;
  assign data_a_wr = aux_q;
  assign out       = aux_q;
  assign out_valid = active && phase == PH_WRITE && mode == MODE_GROW;

  // The rule only ever clears aux pixels: a pass never turns 0 into 255.
  a_only_clears: assert property (@(posedge clk) disable iff (!rst_n)
    (active && phase == PH_READ && mode == MODE_GROW && data_a == '0) |=>
      (aux_q == '0));

endmodule
