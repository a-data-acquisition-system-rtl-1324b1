// Testbench for dma_channel against the PDP-9 memory model: a block of words
// lands at octal 1001 onward in order, END-OF-EVENT writes the word count at
// octal 1000, a second preset restarts the block, and with a 6-word block
// limit OVERFLOW is raised, the extra words are dropped and the count stays 6.
`timescale 1ns/1ps
module tb_dma_channel;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic preset, in_valid, in_ready, write_count, count_done, overflow;
  word_t in_word, word_count, mem_wdata;
  logic mem_req, mem_ack;
  logic [ADDR_W-1:0] mem_addr;
  logic l_preset, l_valid, l_ready, l_wc, l_cd, l_ovf, l_req, l_ack;
  word_t l_word, l_count, l_wdata;
  logic [ADDR_W-1:0] l_addr;
  int checks = 0, failures = 0;

  dma_channel dut (.*);
  pdp9_memory mem (.clk, .mem_req, .mem_addr, .mem_wdata, .mem_ack);

  dma_channel #(.LAST_ADDR(15'o1006)) u_small (
    .clk, .rst_n, .preset(l_preset), .in_valid(l_valid), .in_ready(l_ready), .in_word(l_word),
    .write_count(l_wc), .count_done(l_cd), .overflow(l_ovf), .word_count(l_count),
    .mem_req(l_req), .mem_addr(l_addr), .mem_wdata(l_wdata), .mem_ack(l_ack));
  pdp9_memory mem2 (.clk, .mem_req(l_req), .mem_addr(l_addr), .mem_wdata(l_wdata), .mem_ack(l_ack));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  word_t sent[$];

  task automatic push(word_t w);
    @(negedge clk);
    in_valid = 1; in_word = w;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
    if ($urandom_range(0, 1)) repeat ($urandom_range(1, 4)) @(negedge clk);
  endtask

  task automatic push_small(word_t w);
    @(negedge clk);
    l_valid = 1; l_word = w;
    @(posedge clk);
    while (!l_ready) @(posedge clk);
    @(negedge clk) l_valid = 0;
  endtask

  task automatic end_event();
    @(negedge clk) write_count = 1;
    @(posedge clk);
    while (!count_done) @(posedge clk);
    @(negedge clk) write_count = 0;
  endtask

  initial begin
    int n;
    preset = 0; in_valid = 0; in_word = 0; write_count = 0;
    l_preset = 0; l_valid = 0; l_word = 0; l_wc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 2; blk++) begin
      n = (blk == 0) ? 50 : 7;
      @(negedge clk) preset = 1;
      @(negedge clk) preset = 0;
      sent.delete();
      for (int i = 0; i < n; i++) begin
        sent.push_back(18'($urandom()));
        push(sent[i]);
      end
      end_event();
      repeat (2) @(negedge clk);
      check(mem.mem[15'o1000] == 18'(n), $sformatf("count word %0d, expected %0d", mem.mem[15'o1000], n));
      for (int i = 0; i < n; i++)
        check(mem.mem[15'o1001 + i] == sent[i], $sformatf("word %0d: %h expected %h", i, mem.mem[15'o1001 + i], sent[i]));
      check(!overflow, "overflow without cause");
      check(word_count == 18'(n), "word_count output");
    end
    // overflow: block of 6 words (octal 1001..1006)
    @(negedge clk) l_preset = 1;
    @(negedge clk) l_preset = 0;
    for (int i = 0; i < 9; i++) push_small(18'(i + 100));
    check(l_ovf, "overflow not raised");
    @(negedge clk) l_wc = 1;
    @(posedge clk);
    while (!l_cd) @(posedge clk);
    @(negedge clk) l_wc = 0;
    @(negedge clk);
    check(mem2.mem[15'o1000] == 18'd6, $sformatf("overflow count %0d", mem2.mem[15'o1000]));
    check(mem2.mem[15'o1007] == 18'd0, "word written beyond the block");
    check(mem2.mem[15'o1006] == 18'd105, "last word of the full block");
    check(mem2.writes == 7, $sformatf("%0d memory writes, expected 7", mem2.writes));
    @(negedge clk) l_preset = 1;
    @(negedge clk) l_preset = 0;
    check(!l_ovf, "preset does not clear overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
