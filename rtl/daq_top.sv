// daq_top: data acquisition for a 20-plane, 30,464-wire spark chamber
// spectrometer read through capacitor-diode memories, plus its counter
// electronics and experiment control, serving a PDP-9 computer.
//
// Structure:
//   * 476 capacitor-diode readout cards (cd_readout_board), laid out plane by
//     plane from BOARDS. All cards share a 6-bit board address bus; READ EVEN,
//     READ ODD, TEST and CLEAR reach only the plane being read (CLEAR goes to
//     all). The sense outputs of each group of four planes are wire-ORed on a
//     cable (sense_cable), and the five cables merged into one 32-bit word.
//   * The chamber scan controller and the spark formatter read every board
//     word of every plane and produce PLANE ID words and spark words.
//   * On END-OF-CHAMBER the counter scan controller reads up to 512 data
//     modules through 32 chassis controllers (16 modules each), loading only
//     non-zero words.
//   * All words go through one DMA channel into PDP-9 memory from octal 1001;
//     the word count goes to octal 1000 at END-OF-EVENT.
//   * The event controller ties it together: fast-logic inhibit, run number,
//     API request, and the two self tests.
//   * The 256-channel peripheral device decodes the computer's control words;
//     channels SIM_EVENT_CH, TEST_ONE_CH and TEST_DELAY_CH drive the spark
//     chamber test commands, and the level of channel TOF_LEVEL_CH is the
//     third input of the 2-of-3 majority unit of the time-of-flight checkout
//     (the channel numbers are this design's choice).
// Single clock, 2.5 MHz in the original timing; active-low asynchronous reset.
// The spark inputs stand for the charge a spark puts on a wire: a one-cycle
// pulse on wire_spark[p][64*b + i] charges element i of card b of plane p+1.
module daq_top
  import daq_pkg::*;
#(
  parameter board_table_t BOARDS             = PLANE_BOARDS,
  parameter int unsigned  N_CHASSIS          = 32,
  parameter logic [8:0]   LAST_MODULE_ADDR   = 9'd511,
  parameter int unsigned  TEST_CHARGE_CYCLES = 38,
  parameter int unsigned  TEST_DELAY_UNIT    = 875,
  parameter logic [ADDR_W-1:0] DMA_LAST      = DMA_LAST_ADDR,
  parameter logic [7:0]   SIM_EVENT_CH       = 8'd250,
  parameter logic [7:0]   TEST_ONE_CH        = 8'd251,
  parameter logic [7:0]   TEST_DELAY_CH      = 8'd252,
  parameter logic [7:0]   TOF_LEVEL_CH       = 8'd253
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // fast selection logic
  input  logic                                  event_in,
  output logic                                  inhibit,
  output logic [17:0]                           run_number,
  // chamber wires
  input  logic [N_PLANES-1:0][MAX_BOARDS*64-1:0] wire_spark,
  // data modules in their chassis
  output logic [N_CHASSIS-1:0][15:0]            module_sel,
  input  word_t [N_CHASSIS-1:0][15:0]           module_data,
  // PDP-9 memory and interrupt
  output logic                                  mem_req,
  output logic [ADDR_W-1:0]                     mem_addr,
  output word_t                                 mem_wdata,
  input  logic                                  mem_ack,
  output logic                                  api_req,
  output logic                                  api_overflow,
  input  logic                                  api_ack,
  // PDP-9 programmed I/O to the peripheral device
  input  logic                                  cmd_valid,
  output logic                                  cmd_ready,
  input  logic [17:0]                           cmd_word,
  output logic [17:0]                           rd_data,
  // peripheral device outputs to the experiment
  output logic [255:0]                          ch_select,
  output logic [5:0]                            ch_data,
  output logic                                  data_on,
  output logic                                  data_off,
  output logic [255:0]                          ch_level,
  output logic [255:0][5:0]                     ch_value,
  output logic                                  dvm_connect,
  output logic [7:0]                            dvm_channel,
  input  logic [17:0]                           dvm_value,
  // time-of-flight checkout: two pulse paths into the 2-of-3 majority unit
  input  logic [1:0]                            tof_path,
  output logic                                  tof_coinc
);

  localparam int unsigned N_CABLES = (N_PLANES + 3) / 4;

  // ---------------- chamber readout ----------------
  logic [4:0]  plane;
  logic [5:0]  board_addr;
  logic        read_even, read_odd, clear_caps;
  logic        test_drive;
  logic [4:0]  test_drive_plane;
  logic [N_PLANES-1:0][MAX_BOARDS-1:0][31:0] board_sense;
  logic [N_CABLES-1:0][31:0] cable_line;
  logic [31:0] sense_word;

  for (genvar p = 0; p < N_PLANES; p++) begin : g_plane
    logic plane_read_even, plane_read_odd, plane_test;
    assign plane_read_even = read_even && (plane == 5'(p + 1));
    assign plane_read_odd  = read_odd  && (plane == 5'(p + 1));
    assign plane_test      = test_drive && (test_drive_plane == 5'(p + 1));
    for (genvar b = 0; b < MAX_BOARDS; b++) begin : g_board
      if (b < int'(BOARDS[p])) begin : g_present
        cd_readout_board #(
          .BOARD_ID          (6'(b)),
          .TEST_CHARGE_CYCLES(TEST_CHARGE_CYCLES)
        ) u_board (
          .clk      (clk),
          .rst_n    (rst_n),
          .spark    (wire_spark[p][64*b +: 64]),
          .addr     (board_addr),
          .read_even(plane_read_even),
          .read_odd (plane_read_odd),
          .test     (plane_test),
          .clear    (clear_caps),
          .sense    (board_sense[p][b])
        );
      end else begin : g_absent
        assign board_sense[p][b] = '0;
      end
    end
  end

  for (genvar c = 0; c < N_CABLES; c++) begin : g_cable
    localparam int unsigned NP = (N_PLANES - 4*c < 4) ? N_PLANES - 4*c : 4;
    sense_cable #(.N(NP * MAX_BOARDS)) u_cable (
      .board_sense(board_sense[4*c +: NP]),
      .line       (cable_line[c])
    );
  end

  sense_cable #(.N(N_CABLES)) u_merge (
    .board_sense(cable_line),
    .line       (sense_word)
  );

  // ---------------- formatting and scanning ----------------
  logic       fmt_load, fmt_done, fmt_valid, fmt_ready;
  logic [6:0] fmt_board_word;
  word_t      fmt_word;
  logic       ch_start, ch_done, ch_active;
  logic       abort_scans;
  logic       ch_valid, ch_ready;
  word_t      ch_word;

  spark_formatter u_fmt (
    .clk       (clk),
    .rst_n     (rst_n),
    .flush     (abort_scans),
    .load      (fmt_load),
    .data_in   (sense_word),
    .board_word(fmt_board_word),
    .busy      (),
    .done      (fmt_done),
    .out_valid (fmt_valid),
    .out_ready (fmt_ready),
    .out_word  (fmt_word)
  );

  chamber_scan_controller #(.BOARDS(BOARDS)) u_chamber (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (ch_start),
    .abort_req(abort_scans),
    .done          (ch_done),
    .active        (ch_active),
    .plane         (plane),
    .board_addr    (board_addr),
    .read_even     (read_even),
    .read_odd      (read_odd),
    .clear_caps    (clear_caps),
    .fmt_load      (fmt_load),
    .fmt_board_word(fmt_board_word),
    .fmt_done      (fmt_done),
    .fmt_valid     (fmt_valid),
    .fmt_word      (fmt_word),
    .fmt_ready     (fmt_ready),
    .out_valid     (ch_valid),
    .out_ready     (ch_ready),
    .out_word      (ch_word)
  );

  // ---------------- counter data ----------------
  logic       cnt_start, cnt_done, cnt_active;
  logic [8:0] mod_addr;
  logic       mod_enable;
  word_t [N_CHASSIS-1:0] chassis_data;
  word_t      module_bus;
  logic       cnt_valid, cnt_ready;
  word_t      cnt_word;

  for (genvar k = 0; k < N_CHASSIS; k++) begin : g_chassis
    chassis_controller u_chassis (
      .switches   (5'(k)),
      .addr       (mod_addr),
      .enable     (mod_enable),
      .module_sel (module_sel[k]),
      .module_data(module_data[k]),
      .data_out   (chassis_data[k])
    );
  end

  always_comb begin
    module_bus = '0;
    for (int k = 0; k < N_CHASSIS; k++) module_bus |= chassis_data[k];
  end

  counter_scan_controller #(.LAST_ADDR(LAST_MODULE_ADDR)) u_counters (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (cnt_start),
    .abort_req(abort_scans),
    .done     (cnt_done),
    .active   (cnt_active),
    .addr     (mod_addr),
    .enable   (mod_enable),
    .data_in  (module_bus),
    .out_valid(cnt_valid),
    .out_ready(cnt_ready),
    .out_word (cnt_word)
  );

  // ---------------- DMA ----------------
  logic  dma_preset, dma_in_valid, dma_in_ready, dma_overflow;
  logic  dma_write_count, dma_count_done;
  word_t dma_in_word;

  // The two scans never run together: the chamber scan owns the DMA until
  // END-OF-CHAMBER, the counter scan after it.
  assign dma_in_valid = ch_active ? ch_valid : (cnt_active && cnt_valid);
  assign dma_in_word  = ch_active ? ch_word  : cnt_word;
  assign ch_ready     = ch_active  && dma_in_ready;
  assign cnt_ready    = cnt_active && dma_in_ready;

  dma_channel #(.LAST_ADDR(DMA_LAST)) u_dma (
    .clk        (clk),
    .rst_n      (rst_n),
    .preset     (dma_preset),
    .in_valid   (dma_in_valid),
    .in_ready   (dma_in_ready),
    .in_word    (dma_in_word),
    .write_count(dma_write_count),
    .count_done (dma_count_done),
    .overflow   (dma_overflow),
    .word_count (),
    .mem_req    (mem_req),
    .mem_addr   (mem_addr),
    .mem_wdata  (mem_wdata),
    .mem_ack    (mem_ack)
  );

  // ---------------- control ----------------
  logic [7:0] ch_addr;
  logic       data_on_q;
  logic       sim_event, test_one;

  // One-cycle commands from the rising edge of a DATA ON pulse.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data_on_q <= 1'b0;
    else        data_on_q <= data_on;
  end
  assign sim_event = data_on && !data_on_q && (ch_addr == SIM_EVENT_CH);
  assign test_one  = data_on && !data_on_q && (ch_addr == TEST_ONE_CH);

  event_controller #(
    .TEST_PULSE_CYCLES(TEST_CHARGE_CYCLES),
    .TEST_DELAY_UNIT  (TEST_DELAY_UNIT)
  ) u_event (
    .clk             (clk),
    .rst_n           (rst_n),
    .event_in        (event_in),
    .inhibit         (inhibit),
    .run_number      (run_number),
    .sim_event       (sim_event),
    .test_one        (test_one),
    .test_plane      (ch_data[4:0]),
    .test_delay      (ch_value[TEST_DELAY_CH]),
    .test_drive      (test_drive),
    .test_drive_plane(test_drive_plane),
    .dma_preset      (dma_preset),
    .chamber_start   (ch_start),
    .chamber_done    (ch_done),
    .counter_start   (cnt_start),
    .counter_done    (cnt_done),
    .abort_scans     (abort_scans),
    .dma_overflow    (dma_overflow),
    .dma_write_count (dma_write_count),
    .dma_count_done  (dma_count_done),
    .api_req         (api_req),
    .api_overflow    (api_overflow),
    .api_ack         (api_ack)
  );

  peripheral_device u_periph (
    .clk        (clk),
    .rst_n      (rst_n),
    .cmd_valid  (cmd_valid),
    .cmd_ready  (cmd_ready),
    .cmd_word   (cmd_word),
    .ch_addr    (ch_addr),
    .ch_select  (ch_select),
    .ch_data    (ch_data),
    .data_on    (data_on),
    .data_off   (data_off),
    .ch_level   (ch_level),
    .ch_value   (ch_value),
    .dvm_connect(dvm_connect),
    .dvm_channel(dvm_channel),
    .dvm_value  (dvm_value),
    .rd_data    (rd_data)
  );

  // ---------------- time-of-flight checkout ----------------
  majority_logic #(.N_IN(3), .THRESHOLD(2)) u_tof_majority (
    .in ({ch_level[TOF_LEVEL_CH], tof_path}),
    .out(tof_coinc)
  );

endmodule
