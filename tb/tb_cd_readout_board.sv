// Testbench for cd_readout_board: storage of spark hits, address decode,
// EVEN/ODD interrogation, clearing, and charging by a long drive pulse
// (a short READ must not charge, a pulse of TEST_CHARGE_CYCLES must).
`timescale 1ns/1ps
module tb_cd_readout_board;
  localparam int unsigned TCC = 10;
  logic clk = 0, rst_n = 0;
  logic [63:0] spark;
  logic [5:0]  addr;
  logic read_even, read_odd, test, clear;
  logic [31:0] sense;
  int checks = 0, failures = 0;

  cd_readout_board #(.BOARD_ID(6'd5), .TEST_CHARGE_CYCLES(TCC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic idle();
    spark = '0; read_even = 0; read_odd = 0; test = 0; clear = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] pat;
  initial begin
    idle(); addr = 6'd5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    read_even = 1; #1 check(sense, '0, "empty after reset");
    read_even = 0;
    for (int r = 0; r < 4; r++) begin
      pat = {$urandom(), $urandom()};
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0; spark = pat;
      @(negedge clk) spark = '0;
      // a second, disjoint spark pulse accumulates
      spark = 64'h1; @(negedge clk) spark = '0;
      pat |= 64'h1;
      addr = 6'd5; read_even = 1; #1 check(sense, pat[31:0], "even word");
      @(negedge clk) read_even = 0; read_odd = 1; #1 check(sense, pat[63:32], "odd word");
      addr = 6'd4; #1 check(sense, '0, "other board address");
      addr = 6'd37; #1 check(sense, '0, "other board address 2");
      addr = 6'd5; read_odd = 0; #1 check(sense, '0, "no read");
      // a normal 3-cycle read keeps the contents
      read_even = 1; repeat (3) @(negedge clk); read_even = 0;
      read_odd = 1; #1 check(sense, pat[63:32], "odd after short read");
      read_odd = 0;
      @(negedge clk) read_even = 1; #1 check(sense, pat[31:0], "even after short read");
      read_even = 0;
    end
    // clear
    @(negedge clk) clear = 1; @(negedge clk) clear = 0;
    read_even = 1; #1 check(sense, '0, "cleared even");
    read_even = 0; read_odd = 1; #1 check(sense, '0, "cleared odd");
    read_odd = 0;
    // drive one cycle short of the charge time: nothing charges
    test = 1; repeat (TCC - 1) @(negedge clk); test = 0;
    read_even = 1; #1 check(sense, '0, "short test pulse");
    read_even = 0;
    @(negedge clk);
    // full test pulse charges both words
    test = 1; repeat (TCC) @(negedge clk); test = 0;
    read_even = 1; #1 check(sense, '1, "test charged even");
    read_even = 0; read_odd = 1; #1 check(sense, '1, "test charged odd");
    read_odd = 0;
    // long READ EVEN on an addressed card charges only the even word
    @(negedge clk) clear = 1; @(negedge clk) clear = 0;
    read_even = 1; repeat (TCC) @(negedge clk); read_even = 0;
    read_odd = 1; #1 check(sense, '0, "long even read leaves odd");
    read_odd = 0; read_even = 1; #1 check(sense, '1, "long even read charges even");
    read_even = 0;
    // long READ on a card that is not addressed charges nothing
    @(negedge clk) clear = 1; @(negedge clk) clear = 0;
    addr = 6'd6; read_odd = 1; repeat (TCC + 2) @(negedge clk); read_odd = 0;
    addr = 6'd5; read_odd = 1; #1 check(sense, '0, "unaddressed long read");
    read_odd = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
