// chamber_scan_controller: steps through every word of every wire chamber
// plane and builds the chamber part of the event block.
//
// It holds the 5-bit plane counter (planes 1..N_PLANES) and the 7-bit board
// word counter, whose upper six bits are the board address sent to the cards
// and whose lowest bit chooses the EVEN or ODD word. For each plane it first
// sends the PLANE ID word (MSB = 1) to the DMA, then for each board word:
//   ADDR   : board address on the bus, SETTLE_CYCLES to let it settle,
//   READ   : READ EVEN or READ ODD for READ_CYCLES, the formatter loading the
//            sense lines in the last of them,
//   FORMAT : formatter words are passed to the DMA until the formatter is
//            done (at once for an empty word).
// A plane ends when the board word counter reaches the plane's last word + 1
// (2 * boards words); the plane counter then steps and the next ID word is
// sent. After the last plane the capacitors are cleared for CLEAR_CYCLES and
// `done` (END-OF-CHAMBER) pulses. `abort_req` stops the scan at once and goes
// straight to the clearing, so no charge is left for the next event.
//
// Counters, the ID word, the end-of-plane test and END-OF-CHAMBER follow the
// system description. The settle and read lengths are this design's choice at
// a 2.5 MHz clock: 8 + 3 cycles plus 2 of formatting make 13 cycles (5.2 us)
// per empty word, so the 952 words of the full chamber take about 5 ms, the
// figure given for reading 30K wires. Clearing after readout is also a choice.
module chamber_scan_controller
  import daq_pkg::*;
#(
  parameter board_table_t BOARDS        = PLANE_BOARDS,
  parameter int unsigned  SETTLE_CYCLES = 8,
  parameter int unsigned  READ_CYCLES   = 3,
  parameter int unsigned  CLEAR_CYCLES  = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       abort_req,
  output logic       done,          // END-OF-CHAMBER pulse
  output logic       active,
  // to the readout cards
  output logic [4:0] plane,         // 1-based plane being read
  output logic [5:0] board_addr,
  output logic       read_even,
  output logic       read_odd,
  output logic       clear_caps,
  // to / from the formatting logic
  output logic       fmt_load,
  output logic [6:0] fmt_board_word,
  input  logic       fmt_done,
  input  logic       fmt_valid,
  input  word_t      fmt_word,
  output logic       fmt_ready,
  // to the DMA
  output logic       out_valid,
  input  logic       out_ready,
  output word_t      out_word
);

  typedef enum logic [2:0] {S_IDLE, S_PLANE_ID, S_ADDR, S_READ, S_FORMAT,
                            S_CLEAR, S_DONE} state_t;

  localparam int unsigned TW = $clog2(SETTLE_CYCLES + READ_CYCLES + CLEAR_CYCLES + 2);

  state_t      state;
  logic [6:0]  bword;
  logic [TW-1:0] tmr;
  logic [6:0]  last_plus_one;

  assign last_plus_one  = {BOARDS[plane - 5'd1], 1'b0};   // 2 * boards
  assign board_addr     = bword[6:1];
  assign fmt_board_word = bword;
  assign read_even      = (state == S_READ) && !bword[0];
  assign read_odd       = (state == S_READ) &&  bword[0];
  assign fmt_load       = (state == S_READ) && (tmr == TW'(READ_CYCLES - 1));
  assign clear_caps     = (state == S_CLEAR);
  assign active         = (state != S_IDLE);

  always_comb begin
    out_valid = 1'b0;
    out_word  = make_plane_word(plane);
    fmt_ready = 1'b0;
    if (state == S_PLANE_ID) begin
      out_valid = 1'b1;
    end else if (state == S_FORMAT) begin
      out_valid = fmt_valid;
      out_word  = fmt_word;
      fmt_ready = out_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      plane <= 5'd1;
      bword <= '0;
      tmr   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (abort_req) begin
        // an aborted scan still discharges the capacitors
        tmr   <= '0;
        state <= (state == S_IDLE) ? S_IDLE : S_CLEAR;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            plane <= 5'd1;
            bword <= '0;
            state <= S_PLANE_ID;
          end
          S_PLANE_ID: if (out_ready) begin
            tmr   <= '0;
            state <= S_ADDR;
          end
          S_ADDR: begin
            tmr <= tmr + 1'b1;
            if (tmr == TW'(SETTLE_CYCLES - 1)) begin
              tmr   <= '0;
              state <= S_READ;
            end
          end
          S_READ: begin
            tmr <= tmr + 1'b1;
            if (tmr == TW'(READ_CYCLES - 1)) state <= S_FORMAT;
          end
          S_FORMAT: if (fmt_done) begin
            tmr <= '0;
            if (bword + 7'd1 == last_plus_one) begin   // PLANE NO. and LAST BOARD+1
              bword <= '0;
              if (plane == 5'(N_PLANES)) begin
                state <= S_CLEAR;
              end else begin
                plane <= plane + 5'd1;
                state <= S_PLANE_ID;
              end
            end else begin
              bword <= bword + 7'd1;
              state <= S_ADDR;
            end
          end
          S_CLEAR: begin
            tmr <= tmr + 1'b1;
            if (tmr == TW'(CLEAR_CYCLES - 1)) state <= S_DONE;
          end
          S_DONE: begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // Only one word of a card is interrogated at a time, and a word offered to
  // the DMA stays offered until taken.
  a_one_read: assert property (@(posedge clk) disable iff (!rst_n) !(read_even && read_odd));
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready && !abort_req |=> out_valid && $stable(out_word));

endmodule
