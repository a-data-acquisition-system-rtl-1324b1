// Testbench for counter_scan_controller: the module data bus is answered by a
// table indexed by the address (about a third of the modules non-zero). Only
// non-zero data may reach the DMA, in address order; END-OF-EVENT follows the
// last address. With out_ready high the scan must take
// (SETTLE_CYCLES + 1) per address plus one per loaded word; a second scan runs
// with random out_ready.
`timescale 1ns/1ps
module tb_counter_scan_controller;
  import daq_pkg::*;
  localparam logic [8:0] LAST = 9'd95;
  localparam int unsigned SETTLE = 2;
  logic clk = 0, rst_n = 0;
  logic start, done, active, enable, out_valid, out_ready;
  logic [8:0] addr;
  word_t data_in, out_word;
  word_t table_q [512];
  int checks = 0, failures = 0;

  counter_scan_controller #(.LAST_ADDR(LAST), .SETTLE_CYCLES(SETTLE)) dut (
    .clk, .rst_n, .start, .abort_req(1'b0), .done, .active, .addr, .enable, .data_in,
    .out_valid, .out_ready, .out_word);

  always #5 clk = ~clk;
  assign data_in = enable ? table_q[addr] : '0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t exp_q[$];
  logic rand_ready;
  always @(negedge clk) out_ready <= rand_ready ? ($urandom_range(0, 2) == 0) : 1'b1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    word_t e;
    e = (exp_q.size() != 0) ? exp_q.pop_front() : '0;
    checks++;
    if (out_word !== e || out_word == '0) begin
      failures++;
      $display("FAIL loaded %h expected %h", out_word, e);
    end
  end

  task automatic scan(output int cyc);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  initial begin
    int cyc, nz;
    start = 0; rand_ready = 0;
    for (int pass = 0; pass < 2; pass++) begin
      nz = 0;
      for (int a = 0; a < 512; a++) table_q[a] = ($urandom_range(0, 2) == 0) ? 18'($urandom()) : '0;
      for (int a = 0; a <= int'(LAST); a++) if (table_q[a] != 0) begin
        exp_q.push_back(table_q[a]);
        nz++;
      end
      if (pass == 0) begin
        repeat (3) @(posedge clk);
        rst_n = 1;
      end
      rand_ready = (pass == 1);
      scan(cyc);
      checks++;
      if (exp_q.size() != 0) begin
        failures++;
        $display("FAIL %0d non-zero words never loaded", exp_q.size());
        exp_q.delete();
      end
      if (pass == 0) begin
        checks++;
        if (cyc != (int'(LAST) + 1) * (SETTLE + 1) + nz + 1) begin
          failures++;
          $display("FAIL scan took %0d cycles, expected %0d", cyc, (int'(LAST) + 1) * (SETTLE + 1) + nz + 1);
        end
      end
      checks++;
      if (active) begin
        failures++;
        $display("FAIL still active after END-OF-EVENT");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
