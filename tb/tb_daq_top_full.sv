// Full-size testbench: daq_top with every parameter at its default - 20
// planes, 476 readout boards (30,464 wires), 32 chassis of 16 modules, a
// 3583-word DMA block. One physics event with eight sparks of 2 or 3 wires
// on every plane (the multitrack load the chambers are specified for) and
// random non-zero modules is read out; the whole block in PDP-9 memory is
// compared with the prediction and the time from EVENT to the API request is
// reported. The chamber part must take about 5 ms at 2.5 MHz, and the whole
// readout must leave room for 30 events per second. A second operation is
// the test for '1' on plane 19, one of the two largest planes (36 boards),
// started through the peripheral device after a one-step delay, with 210
// non-zero modules: all 72 words of the plane must encode as zero, and every
// module word must arrive.
`timescale 1ns/1ps
module tb_daq_top_full;
  import daq_pkg::*;
  localparam int unsigned NCH = 32;

  logic clk = 0, rst_n = 0;
  logic event_in, inhibit;
  logic [17:0] run_number;
  logic [N_PLANES-1:0][MAX_BOARDS*64-1:0] wire_spark;
  logic [NCH-1:0][15:0] module_sel;
  word_t [NCH-1:0][15:0] module_data;
  logic mem_req, mem_ack, api_req, api_overflow, api_ack;
  logic [14:0] mem_addr;
  word_t mem_wdata;
  logic cmd_valid, cmd_ready;
  logic [17:0] cmd_word, rd_data, dvm_value;
  logic [255:0] ch_select, ch_level;
  logic [5:0] ch_data;
  logic data_on, data_off, dvm_connect;
  logic [255:0][5:0] ch_value;
  logic [7:0] dvm_channel;
  logic [1:0] tof_path;
  logic tof_coinc;
  int checks = 0, failures = 0;

  daq_top dut (.*);
  pdp9_memory #(.MAX_WAIT(0)) mem (.clk, .mem_req, .mem_addr, .mem_wdata, .mem_ack);

  always #200 clk = ~clk;   // 2.5 MHz

  initial begin
    #100000000;   // 100 ms
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

  word_t modval [512];
  always_comb
    for (int k = 0; k < NCH; k++)
      for (int m = 0; m < 16; m++)
        module_data[k][m] = module_sel[k][m] ? modval[16*k + m] : '0;

  word_t exp_q[$];
  logic [N_PLANES-1:0][MAX_BOARDS*64-1:0] pattern;
  int n_sparks;

  function automatic void predict_word(logic [31:0] w, logic [6:0] bw);
    int s = -1;
    for (int i = 0; i <= 32; i++) begin
      logic b;
      b = (i < 32) ? w[i] : 1'b0;
      if (b && s < 0) s = i;
      if (!b && s >= 0) begin
        exp_q.push_back({1'b0, bw, 5'(i), 5'(i - s)});
        s = -1;
      end
    end
  endfunction

  task automatic send(logic [7:0] a, logic [5:0] d, logic [3:0] flags);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_word = {a, d, flags};
    @(negedge clk) cmd_valid = 0;
    repeat (6) @(negedge clk);
  endtask

  // Wait for the API request, compare the block with exp_q, acknowledge.
  // Returns the cycles waited.
  task automatic take_block(output int cyc);
    int count;
    cyc = 1;
    while (!api_req && cyc < 200000) begin
      @(negedge clk);
      cyc++;
    end
    check(api_req && !api_overflow, "no API request, or overflow");
    count = int'(mem.mem[15'o1000]);
    check(count == exp_q.size(), $sformatf("block holds %0d words, expected %0d", count, exp_q.size()));
    for (int i = 0; i < exp_q.size(); i++)
      check(mem.mem[15'o1001 + i] == exp_q[i],
            $sformatf("block word %0d: %h expected %h", i, mem.mem[15'o1001 + i], exp_q[i]));
    @(negedge clk) api_ack = 1;
    @(negedge clk) api_ack = 0;
    check(!inhibit, "inhibit after acknowledge");
  endtask

  initial begin
    int cyc, count, wires, n_mod;
    tof_path = 0; event_in = 0; wire_spark = '0; api_ack = 0; cmd_valid = 0; cmd_word = 0; dvm_value = 0;
    for (int a = 0; a < 512; a++) modval[a] = ($urandom_range(0, 3) == 0) ? 18'($urandom()) : '0;
    // 8 sparks per plane, 2 or 3 wires wide
    pattern = '0;
    n_sparks = 0;
    wires = 0;
    for (int p = 0; p < N_PLANES; p++) begin
      for (int k = 0; k < 8; k++) begin
        int pos, wd;
        pos = $urandom_range(0, 64 * PLANE_BOARDS[p] - 3);
        wd = $urandom_range(2, 3);
        for (int j = 0; j < wd; j++) pattern[p][pos + j] = 1'b1;
        n_sparks++;
      end
      wires += 64 * PLANE_BOARDS[p];
    end
    check(wires == 30464, $sformatf("chamber has %0d wires, expected 30464", wires));
    for (int p = 0; p < N_PLANES; p++) begin
      exp_q.push_back({1'b1, 12'b0, 5'(p + 1)});
      for (int w = 0; w < 2 * PLANE_BOARDS[p]; w++) predict_word(pattern[p][32*w +: 32], 7'(w));
    end
    for (int a = 0; a < 512; a++) if (modval[a] != 0) exp_q.push_back(modval[a]);

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) wire_spark = pattern;
    @(negedge clk) wire_spark = '0;
    @(negedge clk) event_in = 1;
    @(negedge clk) event_in = 0;
    take_block(cyc);
    count = exp_q.size();
    check(run_number == 18'd1, "run number");
    // chamber about 5 ms, 512 module addresses at 3 cycles each on top
    check(cyc * 400 > 5_000_000 && cyc * 400 < 7_000_000,
          $sformatf("readout took %0d us", cyc * 400 / 1000));
    check(cyc * 400 < 33_000_000, "readout too long for 30 events per second");
    $display("full-size event: %0d sparks, %0d words, EVENT to API request %0d cycles = %0d us",
             n_sparks, count, cyc, cyc * 400 / 1000);

    // test for '1' on plane 19 with 210 modules loaded
    n_mod = 0;
    for (int a = 0; a < 512; a++) begin
      modval[a] = '0;
      if (n_mod < 210 && (a % 5 != 4 || a >= 500)) begin
        modval[a] = 18'($urandom_range(1, 18'h3ffff));
        n_mod++;
      end
    end
    check(n_mod == 210, "module count");
    exp_q.delete();
    for (int p = 0; p < N_PLANES; p++) begin
      exp_q.push_back({1'b1, 12'b0, 5'(p + 1)});
      if (p == 18)
        for (int w = 0; w < 2 * PLANE_BOARDS[p]; w++) exp_q.push_back({1'b0, 7'(w), 10'b0});
    end
    for (int a = 0; a < 512; a++) if (modval[a] != 0) exp_q.push_back(modval[a]);
    check(exp_q.size() == 20 + 72 + 210, "test '1' block size");
    send(8'd252, 6'd1, 4'b1000);   // delay one step (0.35 ms)
    send(8'd251, 6'd19, 4'b1000);  // test for '1' on plane 19
    take_block(cyc);
    check(run_number == 18'd2, "run number after the test");
    // 38-cycle charge, 875-cycle delay and the 12,400-cycle chamber scan at least
    check(cyc > 38 + 875 + 12400 && cyc * 400 < 33_000_000,
          $sformatf("test for '1' took %0d cycles", cyc));
    $display("test for '1' on plane 19: %0d words, %0d cycles from the command to the API request",
             exp_q.size(), cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
