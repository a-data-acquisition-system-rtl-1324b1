// Testbench for majority_logic: every input combination at the 2-of-3
// setting, and a 4-input unit at thresholds 1, 3 and 4, against a count of
// the high inputs.
`timescale 1ns/1ps
module tb_majority_logic;
  logic [2:0] in3;
  logic       out3;
  logic [3:0] in4;
  logic       out4_1, out4_3, out4_4;
  int checks = 0, failures = 0;

  majority_logic dut (.in(in3), .out(out3));
  majority_logic #(.N_IN(4), .THRESHOLD(1)) u41 (.in(in4), .out(out4_1));
  majority_logic #(.N_IN(4), .THRESHOLD(3)) u43 (.in(in4), .out(out4_3));
  majority_logic #(.N_IN(4), .THRESHOLD(4)) u44 (.in(in4), .out(out4_4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      in3 = 3'(v);
      #1 check(out3, $countones(in3) >= 2, $sformatf("2 of 3, inputs %b", in3));
    end
    // a steady level on input 2 lets a single pulse through
    in3 = 3'b100; #1 check(out3, 1'b0, "level alone");
    in3 = 3'b101; #1 check(out3, 1'b1, "level and path 0");
    in3 = 3'b110; #1 check(out3, 1'b1, "level and path 1");
    for (int v = 0; v < 16; v++) begin
      in4 = 4'(v);
      #1;
      check(out4_1, $countones(in4) >= 1, "1 of 4");
      check(out4_3, $countones(in4) >= 3, "3 of 4");
      check(out4_4, $countones(in4) >= 4, "4 of 4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
