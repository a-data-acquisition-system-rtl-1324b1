// Testbench for peripheral_device: random channel settings with DATA ON and
// DATA OFF (pulse length, one-hot select, per-channel level and value kept
// for every channel), DVM ON/OFF with read-back, and refusal of a command
// while a pulse is running.
`timescale 1ns/1ps
module tb_peripheral_device;
  localparam int unsigned PC = 3;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, data_on, data_off, dvm_connect;
  logic [17:0] cmd_word, dvm_value, rd_data;
  logic [7:0] ch_addr, dvm_channel;
  logic [255:0] ch_select, ch_level;
  logic [255:0][5:0] ch_value;
  logic [5:0] ch_data;
  int checks = 0, failures = 0;

  peripheral_device #(.PULSE_CYCLES(PC)) dut (.*);

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

  int on_cycles, off_cycles;
  always @(posedge clk) begin
    if (data_on) on_cycles++;
    if (data_off) off_cycles++;
  end

  logic [255:0]      exp_level;
  logic [255:0][5:0] exp_value;

  task automatic send(logic [7:0] a, logic [5:0] d, logic on, logic off, logic dvon, logic dvoff);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_word = {a, d, on, off, dvon, dvoff};
    @(negedge clk) cmd_valid = 0;
    repeat (PC + 3) @(negedge clk);
  endtask

  initial begin
    logic [7:0] a;
    logic [5:0] d;
    int kind;
    cmd_valid = 0; cmd_word = 0; dvm_value = 18'h2A5A5;
    on_cycles = 0; off_cycles = 0; exp_level = '0; exp_value = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      a = 8'($urandom()); d = 6'($urandom()); kind = $urandom_range(0, 2);
      on_cycles = 0; off_cycles = 0;
      send(a, d, kind == 0, kind == 1, 1'b0, 1'b0);
      if (kind == 0) begin exp_level[a] = 1'b1; exp_value[a] = d; end
      if (kind == 1) exp_level[a] = 1'b0;
      check(ch_addr == a && ch_data == d, "address or data not latched");
      check(ch_select == (256'd1 << a), "select not one-hot on the address");
      check(on_cycles == ((kind == 0) ? PC : 0), $sformatf("DATA ON lasted %0d", on_cycles));
      check(off_cycles == ((kind == 1) ? PC : 0), $sformatf("DATA OFF lasted %0d", off_cycles));
      check(ch_level == exp_level, "channel levels");
      check(ch_value == exp_value, "channel values");
    end
    // DVM
    check(rd_data == '0 && !dvm_connect, "DVM connected after reset");
    send(8'd77, 6'd0, 1'b0, 1'b0, 1'b1, 1'b0);
    check(dvm_connect && dvm_channel == 8'd77, "DVM ON");
    check(rd_data == 18'h2A5A5, "DVM read-back");
    send(8'd5, 6'd1, 1'b1, 1'b0, 1'b0, 1'b0);
    check(dvm_connect && dvm_channel == 8'd77, "DVM moved by a setting");
    send(8'd77, 6'd0, 1'b0, 1'b0, 1'b0, 1'b1);
    check(!dvm_connect && rd_data == '0, "DVM OFF");
    // a command during a pulse is refused
    @(negedge clk) cmd_valid = 1; cmd_word = {8'd9, 6'd3, 4'b1000};
    @(negedge clk) cmd_valid = 0;
    @(negedge clk);
    check(!cmd_ready, "command accepted during a pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
