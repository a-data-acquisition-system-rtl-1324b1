// Testbench for spark_formatter. A reference model in the testbench finds the
// runs of set bits in each 32-bit word and predicts one 18-bit word per run:
// wire = 1-based position of the run's last bit (mod 32), width = run length
// (mod 32). Words include empty ones, all ones (test for '1'), all ones with
// missing bits, alternating bits and random patterns; out_ready is random in
// the second half. The load-to-done time is checked with out_ready held high:
// 2 cycles for an empty word, else (last set bit + 1) shifts + one cycle per
// spark + 2.
`timescale 1ns/1ps
module tb_spark_formatter;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load;
  logic [31:0] data_in;
  logic [6:0] board_word;
  logic busy, done, out_valid, out_ready;
  word_t out_word;
  int checks = 0, failures = 0;

  spark_formatter dut (.flush(1'b0), .*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t exp_q[$];
  int    got_n;
  logic  rand_ready;

  function automatic void predict(logic [31:0] w, logic [6:0] bw);
    int s = -1;
    for (int i = 0; i <= 32; i++) begin
      logic b;
      b = (i < 32) ? w[i] : 1'b0;
      if (b && s < 0) s = i;
      if (!b && s >= 0) begin
        exp_q.push_back({1'b0, bw, 5'(i), 5'(i - s)});   // last bit i-1, 1-based i
        s = -1;
      end
    end
  endfunction

  function automatic int last_set(logic [31:0] w);
    int l = -1;
    for (int i = 0; i < 32; i++) if (w[i]) l = i;
    return l;
  endfunction

  // collect output words
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    got_n++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected word %h", out_word);
    end else begin
      word_t e;
      e = exp_q.pop_front();
      if (out_word !== e) begin
        failures++;
        $display("FAIL word %h expected %h", out_word, e);
      end
    end
  end

  always @(negedge clk) out_ready <= rand_ready ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic run_word(logic [31:0] w, logic [6:0] bw, bit timed);
    int n_before, cyc, exp_cyc;
    n_before = exp_q.size();
    predict(w, bw);
    exp_cyc = (w == 0) ? 2 : last_set(w) + 1 + (exp_q.size() - n_before) + 2;
    @(negedge clk);
    load = 1; data_in = w; board_word = bw;
    @(negedge clk);
    load = 0; data_in = $urandom();
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    if (timed) begin
      checks++;
      if (cyc != exp_cyc) begin
        failures++;
        $display("FAIL latency for %h: %0d cycles, expected %0d", w, cyc, exp_cyc);
      end
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d words missing for %h", exp_q.size(), w);
      exp_q.delete();
    end
  endtask

  logic [31:0] special[8] = '{32'h0, 32'hFFFF_FFFF, 32'hFFFE_FFFF, 32'h5555_5555,
                             32'h8000_0000, 32'h0000_0001, 32'h0000_0018, 32'h7FFF_FFFE};
  initial begin
    load = 0; data_in = 0; board_word = 0; rand_ready = 0; got_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (special[i]) run_word(special[i], 7'(i + 3), 1'b1);
    for (int t = 0; t < 300; t++) begin
      logic [31:0] w;
      w = $urandom() & $urandom();
      if (t % 5 == 0) w = 0;
      run_word(w, 7'($urandom()), 1'b1);
    end
    rand_ready = 1;
    for (int t = 0; t < 300; t++) run_word($urandom() | $urandom(), 7'($urandom()), 1'b0);
    // all ones must give the all-zero wire and width fields
    checks++;
    if (got_n < 100) begin
      failures++;
      $display("FAIL only %0d words produced", got_n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
