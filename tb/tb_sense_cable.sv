// Testbench for sense_cable: the wired OR of like-weight sense bits.
`timescale 1ns/1ps
module tb_sense_cable;
  localparam int unsigned N = 12;
  logic [N-1:0][31:0] board_sense;
  logic [31:0] line, exp;
  int checks = 0, failures = 0;

  sense_cable #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      exp = '0;
      for (int i = 0; i < N; i++) begin
        // mostly one driver, as when one card is read; sometimes several
        board_sense[i] = (t % 3 == 0 || i == t % N) ? $urandom() : 32'h0;
        exp = exp | board_sense[i];
      end
      #1;
      checks++;
      if (line !== exp) begin
        failures++;
        $display("FAIL t=%0d line %h expected %h", t, line, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
