// frame_mem_tb: self-checking test of the 128K x 8 single-port memory.
//
// Writes random bytes to random addresses (and to both ends of the address
// range) with rw = 0, checks that a word reads back combinationally with
// rw = 1, and that clocking with rw = 1 leaves the contents unchanged.
// A reference copy in an associative array supplies the expected data.
module frame_mem_tb;
  import regrow_pkg::*;

  localparam int unsigned AW = ADDR_W;
  localparam int unsigned DW = PIX_W;

  logic          clk = 1'b0;
  logic          rw;
  logic [AW-1:0] add;
  logic [DW-1:0] din, dout;

  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [logic [AW-1:0]];

  frame_mem #(.AW(AW), .DW(DW)) dut (.clk, .rw, .add, .din, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(input logic [AW-1:0] a, input logic [DW-1:0] d);
    @(negedge clk);
    rw = 1'b0; add = a; din = d;
    @(posedge clk);
    ref_mem[a] = d;
    #1 rw = 1'b1;
  endtask

  task automatic check_word(input logic [AW-1:0] a);
    @(negedge clk);
    rw = 1'b1; add = a;
    #1;
    checks++;
    if (dout !== ref_mem[a]) begin
      failures++;
      $display("read %h: got %h expected %h", a, dout, ref_mem[a]);
    end
  endtask

  initial begin
    logic [AW-1:0] addrs [$];
    logic [AW-1:0] a;
    rw = 1'b1; add = '0; din = '0;
    addrs.push_back('0);
    addrs.push_back('1);
    for (int k = 0; k < 300; k++) begin
      a = AW'($urandom);
      if (!ref_mem.exists(a)) addrs.push_back(a);
      ref_mem[a] = '0;
    end
    foreach (addrs[k]) write_word(addrs[k], DW'($urandom));
    foreach (addrs[k]) check_word(addrs[k]);
    // clocking with rw = 1 must not write, whatever din holds
    @(negedge clk);
    rw = 1'b1;
    foreach (addrs[k]) begin
      @(negedge clk);
      add = addrs[k];
      din = ~ref_mem[addrs[k]];
    end
    @(posedge clk);
    foreach (addrs[k]) check_word(addrs[k]);
    // overwrite and read back the same address
    for (int k = 0; k < 50; k++) begin
      write_word(addrs[k], DW'($urandom));
      check_word(addrs[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
