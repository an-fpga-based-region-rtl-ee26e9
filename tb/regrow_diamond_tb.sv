// regrow_diamond_tb: the 25-pixel example run through the whole system.
//
// A 5 x 5 image of 8-bit pixels holds a diamond of four object pixels
// (255) around a background centre pixel (0), the hole. The system, built
// at COLS = ROWS = 5, loads it, then runs passes. Checks:
//   - in the first pass, at the centre pixel (address 13) the image memory
//     reads 0, the auxiliary memory reads 255, all four neighbours read 255,
//     and the centre is output as 255: the hole is not connected to the
//     border and is filled;
//   - the result, written out here by hand, is reached and the system
//     reports convergence after the second pass;
//   - each pass takes 2 x 25 clocks.
module regrow_diamond_tb;
  import regrow_pkg::*;

  localparam int C = 5, R = 5, N = C * R;

  logic             clk = 1'b0, rst_n = 1'b0, vsync = 1'b0, load = 1'b0;
  logic [PIX_W-1:0] video = '0, out;
  logic             out_valid, frame_done, converged;
  int checks = 0, failures = 0;

  // input and expected result, row by row
  localparam logic [PIX_W-1:0] IMG [N] = '{
    0,   0,   0,   0, 0,
    0,   0, 255,   0, 0,
    0, 255,   0, 255, 0,
    0,   0, 255,   0, 0,
    0,   0,   0,   0, 0};
  localparam logic [PIX_W-1:0] FILLED [N] = '{
    0,   0,   0,   0, 0,
    0,   0, 255,   0, 0,
    0, 255, 255, 255, 0,
    0,   0, 255,   0, 0,
    0,   0,   0,   0, 0};

  regrow_top #(.COLS(C), .ROWS(R)) dut (.clk, .rst_n, .vsync, .load, .video,
                                         .out, .out_valid, .frame_done, .converged);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  logic [PIX_W-1:0] outs [N];
  int  got, cycles, centre_seen;

  task automatic frame(bit is_load, int pass);
    got = 0; cycles = 0;
    @(negedge clk) begin vsync = 1'b1; load = is_load; end
    @(posedge clk);
    @(negedge clk) vsync = 1'b0;
    for (int t = 1; t <= 2 * N; t++) begin
      int k = (t - 1) / 2;
      video = IMG[k];
      // read phase of the centre pixel in the first pass
      if (!is_load && pass == 1 && k == 12 && t % 2 == 1) begin
        check(dut.add == 17'd13, "centre address is 13");
        check(dut.data_i == 8'd0, "centre: binary pixel 0");
        check(dut.data_a == 8'd255, "centre: auxiliary pixel 255");
        check(dut.v1 == 8'd255 && dut.v2 == 8'd255 && dut.v3 == 8'd255 && dut.v4 == 8'd255,
              "centre: four neighbours 255");
        centre_seen++;
      end
      @(posedge clk);
      cycles++;
      #1;
      if (out_valid) begin
        outs[got] = out;
        got++;
      end
      if (t == 2 * N) check(frame_done, $sformatf("frame_done after %0d clocks", 2 * N));
      else if (frame_done) check(1'b0, $sformatf("early frame_done at clock %0d", t));
      @(negedge clk);
    end
    load = 1'b0;
    check(got == (is_load ? 0 : N), $sformatf("pass %0d: %0d pixels out", pass, got));
  endtask

  initial begin
    centre_seen = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    frame(1'b1, 0);
    frame(1'b0, 1);
    check(outs[12] == 8'd255, "pass 1: centre hole output as 255");
    foreach (FILLED[p]) check(outs[p] == FILLED[p], $sformatf("pass 1 px %0d", p));
    check(!converged, "pass 1 changed pixels");
    frame(1'b0, 2);
    foreach (FILLED[p]) check(outs[p] == FILLED[p], $sformatf("pass 2 px %0d", p));
    check(converged, "converged after pass 2");
    check(centre_seen == 1, "centre pixel observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
