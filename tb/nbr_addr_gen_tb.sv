// nbr_addr_gen_tb: self-checking test of the neighbour address generator.
//
// Runs two frames of a 7 x 5 raster. After the vsync rising edge, pixel k
// (address k+1) owns clocks 2k (read phase) and 2k+1 (write phase). In the
// read phase the four addresses must be the pixel above, right, below and
// left, modulo 2^17; in the write phase all four must equal k+1. The
// expected values are computed here from k alone.
module nbr_addr_gen_tb;
  import regrow_pkg::*;

  localparam int unsigned COLS = 7;
  localparam int unsigned ROWS = 5;
  localparam int unsigned AW   = ADDR_W;

  logic          clk = 1'b0, rst_n = 1'b0, vsync = 1'b0;
  logic [AW-1:0] add1, add2, add3, add4;

  int checks = 0, failures = 0;

  nbr_addr_gen #(.COLS(COLS), .ROWS(ROWS), .AW(AW)) dut (
    .clk, .rst_n, .vsync, .add1, .add2, .add3, .add4);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect4(input string what, input int unsigned e1, e2, e3, e4);
    logic [AW-1:0] m = '1;
    checks++;
    if (add1 != (e1 & m) || add2 != (e2 & m) || add3 != (e3 & m) || add4 != (e4 & m)) begin
      failures++;
      $display("%s: got %0d %0d %0d %0d expected %0d %0d %0d %0d", what,
               add1, add2, add3, add4, e1 & m, e2 & m, e3 & m, e4 & m);
    end
  endtask

  task automatic run_frame();
    int unsigned a;
    @(negedge clk) vsync = 1'b1;
    @(posedge clk);                        // vsync rising edge seen here
    @(negedge clk) vsync = 1'b0;
    for (int k = 0; k < COLS * ROWS; k++) begin
      a = k + 1;
      // read phase (already started at the preceding posedge)
      if (k != 0) @(negedge clk);
      expect4($sformatf("read  px %0d", k), a - COLS + (1 << AW), a + 1, a + COLS, a - 1);
      @(negedge clk);
      expect4($sformatf("write px %0d", k), a, a, a, a);
    end
    // after the frame the scan idles: address does not advance
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run_frame();
    run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
