// Testbench for chamber_scan_controller (with the spark formatter, which it
// drives). Part 1, reduced plane table and timing, random out_ready: the
// testbench holds a random content for every board word, answers the READ
// lines with it, and checks the word stream (one PLANE ID word per plane,
// then the sparks of every word in board-word order), that READ only ever
// strobes a word that exists, the CLEAR pulse and END-OF-CHAMBER. Part 2, the
// full 476-board table at the default timing with an empty chamber: the scan
// must take 20 + 13 * 952 + 4 cycles after start is sampled, about 5 ms at 2.5 MHz.
`timescale 1ns/1ps
module tb_chamber_scan_controller;
  import daq_pkg::*;
  localparam board_table_t SMALL = '{6'd2, 6'd1, 6'd3, 6'd1, 6'd1, 6'd2, 6'd1, 6'd1, 6'd1, 6'd2,
                                     6'd1, 6'd1, 6'd2, 6'd1, 6'd3, 6'd1, 6'd1, 6'd1, 6'd2, 6'd1};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #50000000;
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

  // ---------------- small configuration ----------------
  logic        s_start, s_done, s_active, s_re, s_ro, s_clear, s_load, s_fdone, s_fvalid, s_fready;
  logic        s_ovalid, s_oready;
  logic [4:0]  s_plane;
  logic [5:0]  s_baddr;
  logic [6:0]  s_bword;
  word_t       s_fword, s_oword;
  logic [31:0] s_sense;
  logic [31:0] content [N_PLANES][64];

  chamber_scan_controller #(.BOARDS(SMALL), .SETTLE_CYCLES(2), .READ_CYCLES(2), .CLEAR_CYCLES(3)) dut (
    .clk(clk), .rst_n(rst_n), .start(s_start), .abort_req(1'b0), .done(s_done), .active(s_active),
    .plane(s_plane), .board_addr(s_baddr), .read_even(s_re), .read_odd(s_ro), .clear_caps(s_clear),
    .fmt_load(s_load), .fmt_board_word(s_bword), .fmt_done(s_fdone), .fmt_valid(s_fvalid),
    .fmt_word(s_fword), .fmt_ready(s_fready), .out_valid(s_ovalid), .out_ready(s_oready),
    .out_word(s_oword));

  spark_formatter u_fmt (.clk(clk), .rst_n(rst_n), .flush(1'b0), .load(s_load), .data_in(s_sense),
    .board_word(s_bword), .busy(), .done(s_fdone), .out_valid(s_fvalid), .out_ready(s_fready),
    .out_word(s_fword));

  always_comb begin
    s_sense = '0;
    if (s_re) s_sense = content[s_plane - 1][{s_baddr, 1'b0}];
    if (s_ro) s_sense = content[s_plane - 1][{s_baddr, 1'b1}];
  end

  word_t exp_q[$];
  int    bad_read, clear_cycles, n_out;

  always @(negedge clk) s_oready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n) begin
    if ((s_re || s_ro) && (s_plane == 0 || s_plane > N_PLANES ||
        {s_baddr, s_ro} >= 7'(2 * SMALL[s_plane - 1]))) bad_read++;
    if (s_clear) clear_cycles++;
    if (s_ovalid && s_oready) begin
      word_t e;
      n_out++;
      e = (exp_q.size() != 0) ? exp_q.pop_front() : '1;
      checks++;
      if (s_oword !== e) begin
        failures++;
        $display("FAIL stream word %0d: %h expected %h", n_out, s_oword, e);
      end
    end
  end

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

  // ---------------- full-size configuration, empty chamber ----------------
  logic        f_start, f_done, f_re, f_ro, f_load, f_fdone, f_fvalid, f_fready, f_ovalid;
  logic [4:0]  f_plane;
  logic [5:0]  f_baddr;
  logic [6:0]  f_bword;
  word_t       f_fword, f_oword;

  chamber_scan_controller full (
    .clk(clk), .rst_n(rst_n), .start(f_start), .abort_req(1'b0), .done(f_done), .active(),
    .plane(f_plane), .board_addr(f_baddr), .read_even(f_re), .read_odd(f_ro), .clear_caps(),
    .fmt_load(f_load), .fmt_board_word(f_bword), .fmt_done(f_fdone), .fmt_valid(f_fvalid),
    .fmt_word(f_fword), .fmt_ready(f_fready), .out_valid(f_ovalid), .out_ready(1'b1),
    .out_word(f_oword));

  spark_formatter u_fmt_full (.clk(clk), .rst_n(rst_n), .flush(1'b0), .load(f_load), .data_in(32'h0),
    .board_word(f_bword), .busy(), .done(f_fdone), .out_valid(f_fvalid), .out_ready(f_fready),
    .out_word(f_fword));

  int f_reads, f_ids;
  always @(posedge clk) if (rst_n) begin
    if (f_load) f_reads++;
    if (f_ovalid && f_oword[17]) f_ids++;
  end

  initial begin
    int cyc, exp_cyc, total_words;
    s_start = 0; f_start = 0; bad_read = 0; clear_cycles = 0; n_out = 0; f_reads = 0; f_ids = 0;
    for (int p = 0; p < N_PLANES; p++)
      for (int w = 0; w < 64; w++) begin
        content[p][w] = (($urandom_range(0, 2) == 0) ? ($urandom() & $urandom()) : 32'h0);
        if (p == 4 && w == 1) content[p][w] = '1;
      end
    for (int p = 0; p < N_PLANES; p++) begin
      exp_q.push_back({1'b1, 12'b0, 5'(p + 1)});
      for (int w = 0; w < 2 * SMALL[p]; w++) predict_word(content[p][w], 7'(w));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) s_start = 1;
    @(negedge clk) s_start = 0;
    cyc = 0;
    while (!s_done) begin
      @(negedge clk);
      cyc++;
    end
    check(exp_q.size() == 0, $sformatf("%0d expected words never came", exp_q.size()));
    check(bad_read == 0, "READ strobed a word beyond the end of a plane");
    check(clear_cycles == 3, $sformatf("CLEAR lasted %0d cycles", clear_cycles));
    check(!s_active, "still active after END-OF-CHAMBER");

    // full size, empty chamber: timing
    total_words = 0;
    for (int p = 0; p < N_PLANES; p++) total_words += 2 * PLANE_BOARDS[p];
    check(total_words == 952, $sformatf("plane table holds %0d words, not 952", total_words));
    exp_cyc = N_PLANES + 13 * total_words + 4 + 1;   // counted from the cycle start is raised
    @(negedge clk) f_start = 1;
    @(negedge clk) f_start = 0;
    cyc = 1;
    while (!f_done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == exp_cyc, $sformatf("full scan took %0d cycles, expected %0d", cyc, exp_cyc));
    check(cyc * 400 > 4_500_000 && cyc * 400 < 5_500_000,
          $sformatf("full scan %0d ns is not about 5 ms", cyc * 400));
    check(f_reads == 952, $sformatf("%0d words read, expected 952", f_reads));
    check(f_ids == 20, $sformatf("%0d plane ID words, expected 20", f_ids));
    $display("full chamber scan: %0d cycles = %0d us at 2.5 MHz", cyc, cyc * 400 / 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
