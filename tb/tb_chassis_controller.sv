// Testbench for chassis_controller: chassis match against the switches,
// 4-bit module decode to one-hot select lines, and the OR of the module data
// buses onto the chassis output only while the chassis is addressed.
`timescale 1ns/1ps
module tb_chassis_controller;
  import daq_pkg::*;
  logic [4:0]  switches;
  logic [8:0]  addr;
  logic        enable;
  logic [15:0] module_sel;
  word_t [15:0] module_data;
  word_t       data_out;
  int checks = 0, failures = 0;

  chassis_controller dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_sel;
    word_t exp_data;
    for (int t = 0; t < 2000; t++) begin
      switches = 5'($urandom());
      addr     = 9'($urandom());
      if (t % 2 == 0) addr[8:4] = switches;
      enable   = ($urandom_range(0, 5) != 0);
      // the selected module drives its data; in a third of the cases
      // the others drive too, to check the OR
      for (int m = 0; m < 16; m++)
        module_data[m] = (m == addr[3:0] || t % 3 == 0) ? 18'($urandom()) : '0;
      exp_sel = '0;
      exp_data = '0;
      if (enable && addr[8:4] == switches) begin
        exp_sel[addr[3:0]] = 1'b1;
        for (int m = 0; m < 16; m++) exp_data = exp_data | module_data[m];
      end
      #1;
      checks += 2;
      if (module_sel !== exp_sel) begin
        failures++;
        $display("FAIL t=%0d sel %h expected %h", t, module_sel, exp_sel);
      end
      if (data_out !== exp_data) begin
        failures++;
        $display("FAIL t=%0d data %h expected %h", t, data_out, exp_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
