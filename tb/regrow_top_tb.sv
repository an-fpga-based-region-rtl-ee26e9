// regrow_top_tb: end-to-end test of the whole system at its default size
// (320 x 240 pixels, 128K x 8 memories), with no parameter overrides.
//
// Acting as the video source, the bench loads a binary image during one
// vsync frame, then runs vsync frames with load low until the system
// reports convergence. Every pass's streamed output is compared with one
// in-place raster pass of the software reference, and the final image with
// an independent flood fill. Then a second image is loaded and processed
// the same way.
//
// Mechanisms counted, each of which must occur at least once:
//   load frames, grow passes that clear pixels, passes after the first that
//   still clear pixels (propagation over several frames), pixels cleared
//   only thanks to a neighbour cleared earlier in the same pass (write-back
//   into the neighbour memories), enclosed holes filled, convergence
//   detected, and a reload after convergence.
// Timing: each frame must end COLS*ROWS*2 = 153,600 clocks after the vsync
// edge, within the 225,000 clocks per frame of a 13.5 MHz clock at 60
// frames/s.
module regrow_top_tb;
  import regrow_pkg::*;
  import regrow_ref_pkg::*;

  localparam int COLS = IMG_COLS;
  localparam int ROWS = IMG_ROWS;
  localparam int N    = COLS * ROWS;
  localparam int CLK_HZ = 13_500_000;
  localparam int FPS    = 60;
  localparam int SP_C   = 14;   // spiral inset size
  localparam int SP_R   = 11;

  logic             clk = 1'b0, rst_n = 1'b0, vsync = 1'b0, load = 1'b0;
  logic [PIX_W-1:0] video = '0, out;
  logic             out_valid, frame_done, converged;

  int checks = 0, failures = 0;
  int n_load = 0, n_clear_pass = 0, n_late_pass = 0, n_inpass = 0;
  int n_holes = 0, n_converged = 0, n_reload = 0;

  regrow_top dut (.clk, .rst_n, .vsync, .load, .video,
                  .out, .out_valid, .frame_done, .converged);

  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endfunction

  // Video source and output capture, one clocked process each. The pixel
  // for slot k is presented from clock 2k after the vsync edge on.
  img_t cur_img, outs_cap;
  int   clk_cnt = -1, got = 0;
  bit   cur_load = 1'b0;

  always @(posedge clk) begin
    if (vsync && load === cur_load && clk_cnt < 0) clk_cnt <= 0;
    else if (clk_cnt >= 0) clk_cnt <= clk_cnt + 1;
    if (frame_done) clk_cnt <= -1;
  end

  always @(negedge clk) begin
    if (clk_cnt >= 0 && cur_load && clk_cnt / 2 < N) video <= cur_img[clk_cnt / 2];
    if (out_valid) begin
      if (got < N) outs_cap[got] = out;
      got++;
    end
  end

  task automatic run_frame(bit is_load, const ref img_t img, ref img_t outs, output int cycles);
    int t0;
    cur_img  = img;
    cur_load = is_load;
    outs_cap = new[N];
    got      = 0;
    @(negedge clk) begin vsync = 1'b1; load = is_load; end
    @(posedge clk);
    #1 t0 = cyc;
    @(negedge clk) vsync = 1'b0;
    @(posedge frame_done);
    #1 cycles = cyc - t0;
    @(negedge clk);
    load = 1'b0;
    outs = outs_cap;
    check(got == (is_load ? 0 : N), $sformatf("%0d output pixels", got));
    check(cycles == 2 * N, $sformatf("frame took %0d clocks", cycles));
    check(cycles <= CLK_HZ / FPS, "frame fits 60 frames/s at 13.5 MHz");
  endtask

  task automatic process(string name, const ref img_t bin, input int max_pass);
    img_t aux, prev, outs, fill;
    int cycles, changed, pass = 0;
    run_frame(1'b1, bin, outs, cycles);
    n_load++;
    check(!converged, "converged cleared by a load frame");
    aux = init_aux(COLS, ROWS);
    do begin
      prev = new[N](aux);
      run_frame(1'b0, bin, outs, cycles);
      pass++;
      changed = grow_pass(bin, aux, COLS, ROWS);
      for (int p = 0; p < N; p++)
        check(outs[p] == aux[p], $sformatf("%s pass %0d px %0d: %0d want %0d",
                                           name, pass, p, outs[p], aux[p]));
      check(converged == (changed == 0), $sformatf("%s pass %0d converged flag", name, pass));
      if (changed > 0) n_clear_pass++;
      if (changed > 0 && pass > 1) n_late_pass++;
      // cleared in this pass although no neighbour was 0 when it began
      for (int r = 1; r < ROWS - 1; r++)
        for (int c = 1; c < COLS - 1; c++) begin
          int p = r * COLS + c;
          if (prev[p] != 0 && aux[p] == 0 && prev[p-COLS] != 0 && prev[p+1] != 0 &&
              prev[p+COLS] != 0 && prev[p-1] != 0) n_inpass++;
        end
    end while (!converged && pass < max_pass);
    check(converged, $sformatf("%s converged within %0d passes", name, max_pass));
    if (converged) n_converged++;
    fill = fill_ref(bin, COLS, ROWS);
    for (int p = 0; p < N; p++) begin
      check(outs[p] == fill[p], $sformatf("%s final px %0d", name, p));
      if (bin[p] == 0 && outs[p] != 0) n_holes++;
    end
    $display("%s: converged after %0d passes", name, pass);
  endtask

  // rings over the whole frame, plus a small spiral pasted at (r0, c0)
  function automatic img_t make_image(int nrings, int unsigned seed, int r0, c0);
    img_t b = gen_rings(COLS, ROWS, nrings, seed);
    img_t s = gen_spiral(SP_C, SP_R);
    for (int r = 0; r < SP_R; r++)
      for (int c = 0; c < SP_C; c++) b[(r0 + r) * COLS + c0 + c] = s[r * SP_C + c];
    return b;
  endfunction

  initial begin
    img_t a, b;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    a = make_image(60, 11, 200, 280);
    process("image A", a, 40);
    b = make_image(40, 99, 10, 20);
    n_reload++;
    process("image B", b, 40);
    $display("mechanisms: load=%0d clearing_passes=%0d later_passes=%0d in_pass_propagation=%0d holes_filled=%0d converged=%0d reload=%0d",
             n_load, n_clear_pass, n_late_pass, n_inpass, n_holes, n_converged, n_reload);
    check(n_load > 0, "load frame happened");
    check(n_clear_pass > 0, "a pass cleared pixels");
    check(n_late_pass > 0, "propagation over several passes happened");
    check(n_inpass > 0, "propagation within one pass happened");
    check(n_holes > 0, "holes were filled");
    check(n_converged > 0, "convergence was detected");
    check(n_reload > 0, "image reloaded after convergence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
