// reg_grow_tb: self-checking test of the region-growing engine on its own.
//
// The six memories are modelled here as plain arrays, and the neighbour
// addresses are derived here from the engine's `add` (above, right, below,
// left in the read phase, `add` itself in the write phase), so only reg_grow
// is under test. For each test image the bench runs a load frame, then grow
// passes until the engine reports convergence, and checks:
//   - every pass: the streamed `out` pixels and the aux memory equal one
//     in-place raster pass of the software reference;
//   - converged is set exactly after the first pass that changed nothing;
//   - the final aux image equals an independent flood-fill result;
//   - a pass takes 2 clocks per pixel (COLS*ROWS*2 clocks to frame_done);
//   - in a load frame the image memory receives the video stream and aux,
//     N1..N4 receive 0 on the border and 255 inside.
// Images: the 5 x 5 diamond with a central hole, random rings and a spiral.
module reg_grow_tb;
  import regrow_pkg::*;
  import regrow_ref_pkg::*;

  localparam int unsigned AW = ADDR_W;
  localparam int unsigned DW = PIX_W;

  int cols, rows;   // size of the engine under test, see the instances

  logic          clk = 1'b0, rst_n = 1'b0, vsync = 1'b0, load = 1'b0;
  logic [DW-1:0] video = '0;
  int            checks = 0, failures = 0;

  // ---- two engines: the 5 x 5 example and a 24 x 16 frame ----
  typedef struct {
    logic [AW-1:0] add;
    logic          rw;
    logic [DW-1:0] data_i_wr, data_a_wr, out;
    logic          out_valid, frame_done, converged;
  } dut_o_t;

  dut_o_t        o [2];
  logic [DW-1:0] data_i [2], data_a [2], v [2][4];
  logic          vs [2];
  logic [DW-1:0] mem_i [2][2**AW];
  logic [DW-1:0] mem_a [2][2**AW];
  logic [DW-1:0] mem_n [2][4][2**AW];

  localparam int unsigned C0 = 5,  R0 = 5;
  localparam int unsigned C1 = 24, R1 = 16;

  reg_grow #(.COLS(C0), .ROWS(R0)) dut0 (
    .clk, .rst_n, .vsync(vs[0]), .load, .video,
    .add(o[0].add), .rw(o[0].rw), .data_i(data_i[0]), .data_i_wr(o[0].data_i_wr),
    .data_a(data_a[0]), .data_a_wr(o[0].data_a_wr),
    .v1(v[0][0]), .v2(v[0][1]), .v3(v[0][2]), .v4(v[0][3]),
    .out(o[0].out), .out_valid(o[0].out_valid), .frame_done(o[0].frame_done),
    .converged(o[0].converged));

  reg_grow #(.COLS(C1), .ROWS(R1)) dut1 (
    .clk, .rst_n, .vsync(vs[1]), .load, .video,
    .add(o[1].add), .rw(o[1].rw), .data_i(data_i[1]), .data_i_wr(o[1].data_i_wr),
    .data_a(data_a[1]), .data_a_wr(o[1].data_a_wr),
    .v1(v[1][0]), .v2(v[1][1]), .v3(v[1][2]), .v4(v[1][3]),
    .out(o[1].out), .out_valid(o[1].out_valid), .frame_done(o[1].frame_done),
    .converged(o[1].converged));

  // ---- memory models ----
  for (genvar d = 0; d < 2; d++) begin : g_mem
    localparam int unsigned CC = (d == 0) ? C0 : C1;
    logic [AW-1:0] na [4];
    always_comb begin
      if (o[d].rw) begin
        na[0] = o[d].add - AW'(CC);
        na[1] = o[d].add + AW'(1);
        na[2] = o[d].add + AW'(CC);
        na[3] = o[d].add - AW'(1);
      end else begin
        na = '{default: o[d].add};
      end
      data_i[d] = mem_i[d][o[d].add];
      data_a[d] = mem_a[d][o[d].add];
      for (int k = 0; k < 4; k++) v[d][k] = mem_n[d][k][na[k]];
    end
    always @(posedge clk) if (!o[d].rw) begin
      mem_i[d][o[d].add] <= o[d].data_i_wr;
      mem_a[d][o[d].add] <= o[d].data_a_wr;
      for (int k = 0; k < 4; k++) mem_n[d][k][o[d].add] <= o[d].data_a_wr;
    end
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endfunction

  // Runs one frame on engine d; in a load frame streams `img` as video.
  // Returns the out stream (grow frames) and the cycle count to frame_done.
  task automatic run_frame(int d, bit is_load, const ref img_t img,
                           ref img_t outs, output int cycles);
    int n = cols * rows, got = 0;
    outs = new[n];
    @(negedge clk) begin vs[d] = 1'b1; load = is_load; end
    @(posedge clk);                         // rising edge seen: clock 0
    cycles = 0;
    fork
      begin
        for (int k = 0; k < n; k++) begin
          #1 video = is_load ? img[k] : 8'hA5;
          @(posedge clk); @(posedge clk);
        end
      end
      begin
        @(negedge clk) vs[d] = 1'b0;
        while (!o[d].frame_done) begin
          @(negedge clk);
          if (o[d].out_valid) begin
            check(o[d].add == AW'(got + 1), $sformatf("out order px %0d", got));
            if (got < n) outs[got] = o[d].out;
            got++;
          end
          cycles++;
        end
      end
    join
    if (!is_load) check(got == n, $sformatf("out count %0d of %0d", got, n));
    else check(got == 0, "no out_valid in a load frame");
    load = 1'b0;
  endtask

  task automatic run_image(int d, string name, const ref img_t bin, input int max_pass);
    img_t aux, outs, expect_fill;
    int   cycles, changed, pass = 0;
    bit   done = 0;
    run_frame(d, 1'b1, bin, outs, cycles);
    check(cycles == 2 * cols * rows, $sformatf("%s load frame took %0d clocks", name, cycles));
    aux = init_aux(cols, rows);
    for (int p = 0; p < cols * rows; p++) begin
      check(mem_i[d][p+1] == bin[p], $sformatf("%s image mem px %0d", name, p));
      check(mem_a[d][p+1] == aux[p] && mem_n[d][0][p+1] == aux[p] && mem_n[d][1][p+1] == aux[p]
            && mem_n[d][2][p+1] == aux[p] && mem_n[d][3][p+1] == aux[p],
            $sformatf("%s initial aux px %0d", name, p));
    end
    check(!o[d].converged, $sformatf("%s converged cleared by load", name));
    while (!done && pass < max_pass) begin
      run_frame(d, 1'b0, bin, outs, cycles);
      pass++;
      changed = grow_pass(bin, aux, cols, rows);
      check(cycles == 2 * cols * rows, $sformatf("%s pass %0d took %0d clocks", name, pass, cycles));
      for (int p = 0; p < cols * rows; p++) begin
        check(outs[p] == aux[p], $sformatf("%s pass %0d out px %0d = %0d, want %0d",
                                           name, pass, p, outs[p], aux[p]));
        check(mem_a[d][p+1] == aux[p], $sformatf("%s pass %0d aux px %0d", name, pass, p));
      end
      check(o[d].converged == (changed == 0),
            $sformatf("%s pass %0d converged=%0d changed=%0d", name, pass, o[d].converged, changed));
      done = o[d].converged;
    end
    check(done, $sformatf("%s converged within %0d passes", name, max_pass));
    expect_fill = fill_ref(bin, cols, rows);
    for (int p = 0; p < cols * rows; p++)
      check(aux[p] == expect_fill[p] && mem_a[d][p+1] == expect_fill[p],
            $sformatf("%s final px %0d", name, p));
    $display("%s: %0d passes", name, pass);
  endtask

  initial begin
    img_t diamond, rings, spiral;
    vs[0] = 1'b0; vs[1] = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 5 x 5 diamond: object pixels around the centre, centre is a hole
    cols = C0; rows = R0;
    diamond = new[25];
    foreach (diamond[p]) diamond[p] = 8'd0;
    diamond[7] = 8'd255; diamond[11] = 8'd255; diamond[13] = 8'd255; diamond[17] = 8'd255;
    run_image(0, "diamond", diamond, 5);
    check(mem_a[0][13] == 8'd255, "diamond centre hole filled");
    check(mem_a[0][7] == 8'd0, "diamond corner cleared");

    cols = C1; rows = R1;
    rings = gen_rings(cols, rows, 4, 7);
    run_image(1, "rings", rings, 20);
    spiral = gen_spiral(cols, rows);
    run_image(1, "spiral", spiral, 60);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
