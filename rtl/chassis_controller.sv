// chassis_controller: the control module of one chassis of data modules
// (scalers, ADCs, time-of-flight digitisers, run identification).
//
// The 9-bit module address from the counter acquisition logic is split into
// a 5-bit chassis number, addr[8:4], and a 4-bit module number, addr[3:0].
// The chassis responds only when addr[8:4] equals its switch setting; it then
// decodes the module number to one of 16 select lines and places the OR of
// the 16 module data buses (bits of like weight wire-ORed; only the selected
// module drives) on the common data bus. Everything is combinational.
//
// The 5/4 address split, the switch compare and the OR function follow the
// system description; which address bits form the chassis number, and the
// `enable` strobe that gates the decode, are this design's choices.
module chassis_controller
  import daq_pkg::*;
(
  input  logic [4:0]         switches,     // chassis number set on the module
  input  logic [8:0]         addr,         // module address from the counter
  input  logic               enable,       // address valid
  output logic [15:0]        module_sel,   // select line of each module
  input  word_t [15:0]       module_data,  // data bus of each module
  output word_t              data_out      // to the counter acquisition logic
);

  logic hit;

  assign hit = enable && (addr[8:4] == switches);

  always_comb begin
    module_sel = '0;
    data_out   = '0;
    if (hit) begin
      module_sel[addr[3:0]] = 1'b1;
      for (int m = 0; m < 16; m++) data_out |= module_data[m];
    end
  end

endmodule
