// Testbench for event_controller. The testbench plays the chamber scan, the
// counter scan and the DMA: it answers chamber_start with chamber_done and
// counter_start with counter_done after random delays, and write_count with
// count_done. Checked: the order of the steps, the inhibit covering the whole
// cycle, events ignored while inhibited, the run number, the API request held
// until acknowledged, SIMULATE EVENT, the test for '1' (test drive length and
// plane, then exactly test_delay * TEST_DELAY_UNIT cycles before the readout
// starts), and the overflow path (scans aborted, no counter scan, count
// written, api_overflow set).
`timescale 1ns/1ps
module tb_event_controller;
  localparam int unsigned TPC = 5, TDU = 7;
  logic clk = 0, rst_n = 0;
  logic event_in, inhibit, sim_event, test_one, test_drive;
  logic [17:0] run_number;
  logic [4:0] test_plane, test_drive_plane;
  logic [5:0] test_delay;
  logic dma_preset, chamber_start, chamber_done, counter_start, counter_done, abort_scans;
  logic dma_overflow, dma_write_count, dma_count_done, api_req, api_overflow, api_ack;
  int checks = 0, failures = 0;

  event_controller #(.TEST_PULSE_CYCLES(TPC), .TEST_DELAY_UNIT(TDU)) dut (.*);

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

  // environment model
  bit force_overflow;
  int n_chamber, n_counter, n_count, n_preset, n_abort, n_drive, drive_plane_err;
  int t_drive_end, t_chamber_start, cycle;
  always @(posedge clk) cycle++;
  initial begin
    chamber_done = 0; counter_done = 0; dma_count_done = 0; dma_overflow = 0;
    forever begin
      @(posedge clk);
      if (!rst_n) continue;
      if (dma_preset) begin
        n_preset++;
        dma_overflow <= 0;
      end
      if (abort_scans) n_abort++;
      if (test_drive) begin
        n_drive++;
        t_drive_end = cycle;
        if (test_drive_plane != test_plane) drive_plane_err++;
      end
      if (chamber_start) begin
        n_chamber++;
        t_chamber_start = cycle;
        fork begin
          repeat ($urandom_range(3, 20)) @(posedge clk);
          if (force_overflow) dma_overflow <= 1;
          else begin
            chamber_done <= 1;
            @(posedge clk) chamber_done <= 0;
          end
        end join_none
      end
      if (counter_start) begin
        n_counter++;
        check(inhibit, "counter scan outside inhibit");
        fork begin
          repeat ($urandom_range(3, 20)) @(posedge clk);
          counter_done <= 1;
          @(posedge clk) counter_done <= 0;
        end join_none
      end
      dma_count_done <= 0;
      if (dma_write_count && !dma_count_done && $urandom_range(0, 1)) begin
        n_count++;
        dma_count_done <= 1;
      end
    end
  end

  task automatic wait_api_and_ack();
    int guard = 0;
    while (!api_req && guard < 100000) begin
      @(negedge clk);
      guard++;
      check(inhibit, "inhibit dropped before the API request");
    end
    repeat ($urandom_range(1, 10)) begin
      @(negedge clk);
      check(api_req && inhibit, "API request or inhibit dropped before acknowledge");
      // events during the inhibit are ignored
      event_in = 1;
    end
    event_in = 0;
    api_ack = 1;
    @(negedge clk) api_ack = 0;
    check(!inhibit && !api_req, "not idle after acknowledge");
  endtask

  initial begin
    event_in = 0; sim_event = 0; test_one = 0; test_plane = 0; test_delay = 0; api_ack = 0;
    force_overflow = 0; cycle = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // three events
    for (int e = 1; e <= 3; e++) begin
      @(negedge clk) event_in = 1;
      @(negedge clk) event_in = 0;
      check(inhibit, "inhibit not raised by EVENT");
      wait_api_and_ack();
      check(run_number == 18'(e), $sformatf("run number %0d after %0d events", run_number, e));
      check(n_chamber == e && n_counter == e && n_count == e && n_preset == e,
            $sformatf("step counts %0d %0d %0d %0d", n_chamber, n_counter, n_count, n_preset));
      check(!api_overflow, "overflow flag without overflow");
    end
    // simulate event
    @(negedge clk) sim_event = 1;
    @(negedge clk) sim_event = 0;
    wait_api_and_ack();
    check(n_chamber == 4 && n_counter == 4, "simulate event did not run a readout");
    // test for '1'
    test_plane = 5'd7; test_delay = 6'd3;
    @(negedge clk) test_one = 1;
    @(negedge clk) test_one = 0;
    wait_api_and_ack();
    check(n_drive == TPC, $sformatf("test drive lasted %0d cycles, expected %0d", n_drive, TPC));
    check(drive_plane_err == 0, "test drove the wrong plane");
    check(t_chamber_start - t_drive_end == 3 * TDU + 2,
          $sformatf("delay %0d cycles, expected %0d", t_chamber_start - t_drive_end, 3 * TDU + 2));
    check(n_chamber == 5, "test did not start a readout");
    // overflow during the chamber scan
    force_overflow = 1;
    @(negedge clk) event_in = 1;
    @(negedge clk) event_in = 0;
    wait_api_and_ack();
    check(api_overflow, "api_overflow not set");
    check(n_abort == 1, $sformatf("%0d aborts", n_abort));
    check(n_counter == 5, "counter scan started after overflow");
    check(n_count == 6, "word count not written after overflow");
    check(run_number == 18'd6, "run number after six readouts");
    force_overflow = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
