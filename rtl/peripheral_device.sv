// peripheral_device: the 256-channel programmed-I/O device through which the
// computer sets and reads back the experiment (photomultiplier voltages, NIM
// levels and pulses, relays, the spark chamber test commands).
//
// A command is one 18-bit computer word, taken when cmd_valid is high:
//   [17:10] channel address (256 channels)
//   [9:4]   function, data or sub-address (6 bits)
//   [3]     DATA ON    [2] DATA OFF
//   [1]     DVM ON     [0] DVM OFF
// The address and the 6-bit data are latched and put out (`ch_select` one-hot,
// `ch_data`). DATA ON (or DATA OFF) then follows as a pulse of PULSE_CYCLES on
// data_on/data_off, one cycle after the latch so the data is settled. The
// device also keeps, for every channel, the level last switched by DATA ON or
// DATA OFF (`ch_level`, the NIM level outputs) and the data last set with
// DATA ON (`ch_value`, the 6-bit setting, e.g. a PM voltage in 15 V steps).
// DVM ON connects the digital voltmeter to the addressed channel
// (dvm_connect, dvm_channel) until DVM OFF; a READ returns the meter's value
// (`rd_data`, zero while no meter is connected). A command arriving while a
// pulse is still running is refused (`cmd_ready` low).
//
// The field widths and their meaning follow the system description; the bit
// positions, the pulse length and the per-channel level and value registers
// are this design's choices.
module peripheral_device #(
  parameter int unsigned N_CH         = 256,
  parameter int unsigned PULSE_CYCLES = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  logic [17:0]             cmd_word,
  output logic [7:0]              ch_addr,
  output logic [N_CH-1:0]         ch_select,
  output logic [5:0]              ch_data,
  output logic                    data_on,
  output logic                    data_off,
  output logic [N_CH-1:0]         ch_level,
  output logic [N_CH-1:0][5:0]    ch_value,
  output logic                    dvm_connect,
  output logic [7:0]              dvm_channel,
  input  logic [17:0]             dvm_value,
  output logic [17:0]             rd_data
);

  localparam int unsigned PW = $clog2(PULSE_CYCLES + 1);

  logic          pend_on, pend_off;
  logic [PW-1:0] pulse_tmr;
  logic          pulsing;

  assign pulsing   = (pulse_tmr != '0);
  assign cmd_ready = !pulsing && !pend_on && !pend_off;
  assign rd_data   = dvm_connect ? dvm_value : '0;

  always_comb begin
    ch_select = '0;
    ch_select[ch_addr] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch_addr     <= '0;
      ch_data     <= '0;
      pend_on     <= 1'b0;
      pend_off    <= 1'b0;
      pulse_tmr   <= '0;
      data_on     <= 1'b0;
      data_off    <= 1'b0;
      ch_level    <= '0;
      ch_value    <= '0;
      dvm_connect <= 1'b0;
      dvm_channel <= '0;
    end else begin
      if (cmd_valid && cmd_ready) begin
        ch_addr  <= cmd_word[17:10];
        ch_data  <= cmd_word[9:4];
        pend_on  <= cmd_word[3];
        pend_off <= cmd_word[2] && !cmd_word[3];
        if (cmd_word[1]) begin
          dvm_connect <= 1'b1;
          dvm_channel <= cmd_word[17:10];
        end else if (cmd_word[0]) begin
          dvm_connect <= 1'b0;
        end
      end else if (pend_on || pend_off) begin
        // data has settled for one cycle: start the DATA ON / OFF pulse
        data_on   <= pend_on;
        data_off  <= pend_off;
        pulse_tmr <= PW'(PULSE_CYCLES);
        if (pend_on) begin
          ch_level[ch_addr] <= 1'b1;
          ch_value[ch_addr] <= ch_data;
        end else begin
          ch_level[ch_addr] <= 1'b0;
        end
        pend_on  <= 1'b0;
        pend_off <= 1'b0;
      end else if (pulsing) begin
        pulse_tmr <= pulse_tmr - 1'b1;
        if (pulse_tmr == PW'(1)) begin
          data_on  <= 1'b0;
          data_off <= 1'b0;
        end
      end
    end
  end

endmodule
