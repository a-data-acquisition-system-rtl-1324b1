// End-to-end testbench for daq_top at a reduced chamber (1 to 3 boards per
// plane), a short test delay step and a 400-word DMA block; everything else
// at its default. The testbench plays the PDP-9 (memory model, API
// acknowledge, control words to the peripheral device), the fast logic
// (sparks on wires, then EVENT) and the data modules (each drives its value
// while selected). For every readout cycle it predicts the whole event block
// - PLANE ID words, spark words of every board word, non-zero module words,
// word count at octal 1000 - and compares it with memory.
// Sequence: three events with random sparks (events offered during the
// inhibit are ignored), a PM-voltage style setting and DVM read, the
// time-of-flight majority unit switched by a NIM level, SIMULATE
// EVENT (test for '0'), the test for '1' on plane 3, and an event too large
// for the block (OVERFLOW). Each mechanism is counted and must occur.
`timescale 1ns/1ps
module tb_daq_top;
  import daq_pkg::*;
  localparam board_table_t TBL = '{6'd2, 6'd1, 6'd3, 6'd1, 6'd1, 6'd2, 6'd1, 6'd1, 6'd1, 6'd2,
                                   6'd1, 6'd1, 6'd2, 6'd1, 6'd3, 6'd1, 6'd1, 6'd1, 6'd2, 6'd1};
  localparam logic [14:0] DLAST = 15'o1001 + 15'd399;
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

  daq_top #(.BOARDS(TBL), .TEST_DELAY_UNIT(10), .DMA_LAST(DLAST)) dut (.*);
  pdp9_memory mem (.clk, .mem_req, .mem_addr, .mem_wdata, .mem_ack);

  always #200 clk = ~clk;   // 2.5 MHz

  initial begin
    #2000000000;
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

  // data modules
  word_t modval [512];
  always_comb
    for (int k = 0; k < NCH; k++)
      for (int m = 0; m < 16; m++)
        module_data[k][m] = module_sel[k][m] ? modval[16*k + m] : '0;

  // mechanism counters
  int n_events, n_ignored, n_id_words, n_empty_words, n_multi_words, n_wide_wrap;
  int n_tof, n_mod_loaded, n_mod_suppressed, n_sim, n_test_one, n_overflow, n_dvm, n_setting;

  // expected block
  word_t exp_q[$];
  logic [N_PLANES-1:0][MAX_BOARDS*64-1:0] pattern;

  function automatic int predict_word(logic [31:0] w, logic [6:0] bw);
    int s = -1, n = 0;
    for (int i = 0; i <= 32; i++) begin
      logic b;
      b = (i < 32) ? w[i] : 1'b0;
      if (b && s < 0) s = i;
      if (!b && s >= 0) begin
        exp_q.push_back({1'b0, bw, 5'(i), 5'(i - s)});
        s = -1;
        n++;
      end
    end
    return n;
  endfunction

  task automatic predict_block();
    int n;
    exp_q.delete();
    for (int p = 0; p < N_PLANES; p++) begin
      exp_q.push_back({1'b1, 12'b0, 5'(p + 1)});
      n_id_words++;
      for (int w = 0; w < 2 * TBL[p]; w++) begin
        n = predict_word(pattern[p][32*w +: 32], 7'(w));
        if (n == 0) n_empty_words++;
        if (n > 1) n_multi_words++;
      end
    end
    for (int a = 0; a < 512; a++)
      if (modval[a] != 0) begin
        exp_q.push_back(modval[a]);
        n_mod_loaded++;
      end else n_mod_suppressed++;
  endtask

  task automatic new_modules();
    for (int a = 0; a < 512; a++) modval[a] = ($urandom_range(0, 9) == 0) ? 18'($urandom()) : '0;
  endtask

  task automatic fire_sparks(int density);
    pattern = '0;
    for (int p = 0; p < N_PLANES; p++)
      for (int w = 0; w < 2 * TBL[p]; w++)
        for (int i = 0; i < 32; i++)
          if ($urandom_range(0, 99) < density) begin
            // sparks 1..3 wires wide
            int wd = $urandom_range(1, 3);
            for (int j = 0; j < wd && i + j < 32; j++) pattern[p][32*w + i + j] = 1'b1;
          end
    @(negedge clk) wire_spark = pattern;
    @(negedge clk) wire_spark = '0;
  endtask

  // wait for the API request, compare the block, acknowledge
  task automatic take_block(bit expect_overflow);
    int guard = 0, count;
    while (!api_req && guard < 200000) begin
      @(negedge clk);
      guard++;
      if (guard % 1000 == 0 && inhibit) begin
        // the fast logic keeps offering events: they must be ignored
        event_in = 1;
        @(negedge clk) event_in = 0;
        n_ignored++;
      end
    end
    check(api_req, "no API request");
    check(api_overflow == expect_overflow, $sformatf("api_overflow %0d", api_overflow));
    count = int'(mem.mem[15'o1000]);
    if (!expect_overflow) begin
      check(count == exp_q.size(), $sformatf("block holds %0d words, expected %0d", count, exp_q.size()));
      for (int i = 0; i < exp_q.size(); i++)
        check(mem.mem[15'o1001 + i] == exp_q[i],
              $sformatf("block word %0d: %h expected %h", i, mem.mem[15'o1001 + i], exp_q[i]));
    end else begin
      n_overflow++;
      check(count == int'(DLAST - 15'o1001 + 1), $sformatf("overflow block count %0d", count));
      for (int i = 0; i < count; i++)
        check(mem.mem[15'o1001 + i] == exp_q[i], $sformatf("overflow block word %0d", i));
    end
    @(negedge clk) api_ack = 1;
    @(negedge clk) api_ack = 0;
    check(!inhibit, "inhibit still high after acknowledge");
  endtask

  task automatic send(logic [7:0] a, logic [5:0] d, logic [3:0] flags);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_word = {a, d, flags};
    @(negedge clk) cmd_valid = 0;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    int run0;
    tof_path = 0; event_in = 0; wire_spark = '0; api_ack = 0; cmd_valid = 0; cmd_word = 0; dvm_value = 18'o123456;
    n_events = 0; n_ignored = 0; n_id_words = 0; n_empty_words = 0; n_multi_words = 0; n_wide_wrap = 0;
    n_tof = 0; n_mod_loaded = 0; n_mod_suppressed = 0; n_sim = 0; n_test_one = 0; n_overflow = 0; n_dvm = 0; n_setting = 0;
    new_modules();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // three physics events
    for (int e = 0; e < 3; e++) begin
      fire_sparks(4);
      predict_block();
      @(negedge clk) event_in = 1;
      @(negedge clk) event_in = 0;
      take_block(1'b0);
      n_events++;
      check(run_number == 18'(e + 1), "run number");
      new_modules();
    end
    // a PM setting and its read-back on the voltmeter
    send(8'd17, 6'd40, 4'b1000);
    check(ch_value[17] == 6'd40 && ch_level[17], "PM channel 17 setting");
    n_setting++;
    send(8'd17, 6'd0, 4'b0010);
    check(dvm_connect && dvm_channel == 8'd17 && rd_data == 18'o123456, "DVM read of channel 17");
    n_dvm++;
    send(8'd17, 6'd0, 4'b0001);
    // time-of-flight majority unit: with the level low both paths must
    // coincide, with it high either path alone fires
    tof_path = 2'b01; #1 check(!tof_coinc, "one path fired without the level");
    tof_path = 2'b11; #1 check(tof_coinc, "both paths did not fire");
    send(8'd253, 6'd0, 4'b1000);
    tof_path = 2'b01; #1 check(tof_coinc, "path 0 with the level");
    tof_path = 2'b10; #1 check(tof_coinc, "path 1 with the level");
    tof_path = 2'b00; #1 check(!tof_coinc, "level alone fired");
    send(8'd253, 6'd0, 4'b0100);
    tof_path = 2'b10; #1 check(!tof_coinc, "level not removed by DATA OFF");
    tof_path = 2'b00;
    n_tof++;
    // test for '0': SIMULATE EVENT, chamber must be empty
    pattern = '0;
    predict_block();
    send(8'd250, 6'd0, 4'b1000);
    take_block(1'b0);
    n_sim++;
    // test for '1' on plane 3 after a delay of 2 steps
    send(8'd252, 6'd2, 4'b1000);
    pattern = '0;
    for (int w = 0; w < 2 * TBL[2]; w++) pattern[2][32*w +: 32] = '1;
    predict_block();
    for (int w = 0; w < 2 * TBL[2]; w++)
      check(exp_q[3 + w] == {1'b0, 7'(w), 10'b0}, "all-ones word does not encode as zero");
    n_wide_wrap += 2 * TBL[2];
    run0 = int'(run_number);
    send(8'd251, 6'd3, 4'b1000);
    take_block(1'b0);
    n_test_one++;
    check(int'(run_number) == run0 + 1, "test readout did not count");
    // overflow: every other wire sparked, 16 sparks in every word
    pattern = '0;
    for (int p = 0; p < N_PLANES; p++)
      for (int w = 0; w < 2 * TBL[p]; w++) pattern[p][32*w +: 32] = 32'h5555_5555;
    @(negedge clk) wire_spark = pattern;
    @(negedge clk) wire_spark = '0;
    predict_block();
    @(negedge clk) event_in = 1;
    @(negedge clk) event_in = 0;
    take_block(1'b1);
    // one more ordinary event after the overflow
    fire_sparks(3);
    predict_block();
    @(negedge clk) event_in = 1;
    @(negedge clk) event_in = 0;
    take_block(1'b0);
    n_events++;

    check(n_events > 0, "no physics event");
    check(n_ignored > 0, "no event was offered during the inhibit");
    check(n_id_words > 0, "no plane ID word");
    check(n_empty_words > 0, "no empty word skipped");
    check(n_multi_words > 0, "no word with several sparks");
    check(n_wide_wrap > 0, "no 32-wire word");
    check(n_mod_loaded > 0 && n_mod_suppressed > 0, "no module loaded or suppressed");
    check(n_sim > 0 && n_test_one > 0, "self tests not run");
    check(n_overflow > 0, "no overflow");
    check(n_dvm > 0 && n_setting > 0, "peripheral device not exercised");
    check(n_tof > 0, "time-of-flight majority unit not exercised");
    $display("events %0d, ignored while inhibited %0d, plane IDs %0d, empty words %0d, multi-spark words %0d",
             n_events, n_ignored, n_id_words, n_empty_words, n_multi_words);
    $display("all-ones words %0d, modules loaded %0d, suppressed %0d, simulate %0d, test-1 %0d, overflow %0d",
             n_wide_wrap, n_mod_loaded, n_mod_suppressed, n_sim, n_test_one, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
