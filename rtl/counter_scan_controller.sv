// counter_scan_controller: collects the data of the counter electronics after
// the wire chambers have been read.
//
// On `start` (END-OF-CHAMBER) a 9-bit address counter runs from 0 to
// LAST_ADDR. For each address it drives the address with `enable` high, waits
// SETTLE_CYCLES for the chassis and module to respond, then examines the data
// bus: a non-zero word is loaded into the DMA (out_valid/out_ready), a zero
// word is skipped. After the last address `done` pulses: this is END-OF-EVENT.
// `abort_req` returns to idle at once.
//
// The 9-bit counter, the zero suppression and END-OF-EVENT follow the system
// description. The settle time, and that each non-zero module gives exactly
// one word holding its data and nothing else, are this design's choices.
// Timing: SETTLE_CYCLES + 1 cycles per empty address, one more per loaded
// word while the DMA is ready.
module counter_scan_controller
  import daq_pkg::*;
#(
  parameter logic [8:0]  LAST_ADDR     = 9'd511,
  parameter int unsigned SETTLE_CYCLES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       abort_req,
  output logic       done,       // END-OF-EVENT pulse
  output logic       active,
  output logic [8:0] addr,
  output logic       enable,
  input  word_t      data_in,
  output logic       out_valid,
  input  logic       out_ready,
  output word_t      out_word
);

  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_EXAMINE, S_LOAD} state_t;

  localparam int unsigned TW = $clog2(SETTLE_CYCLES + 1);

  state_t        state;
  logic [TW-1:0] tmr;
  word_t         held;

  assign enable    = (state == S_SETTLE) || (state == S_EXAMINE);
  assign out_valid = (state == S_LOAD);
  assign out_word  = held;
  assign active    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      addr  <= '0;
      tmr   <= '0;
      held  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (abort_req) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            addr  <= '0;
            tmr   <= '0;
            state <= S_SETTLE;
          end
          S_SETTLE: begin
            tmr <= tmr + 1'b1;
            if (tmr == TW'(SETTLE_CYCLES - 1)) state <= S_EXAMINE;
          end
          S_EXAMINE: begin
            tmr <= '0;
            if (data_in != '0) begin
              held  <= data_in;
              state <= S_LOAD;
            end else if (addr == LAST_ADDR) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              addr  <= addr + 9'd1;
              state <= S_SETTLE;
            end
          end
          S_LOAD: if (out_ready) begin
            if (addr == LAST_ADDR) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              addr  <= addr + 9'd1;
              state <= S_SETTLE;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // A module word offered to the DMA stays offered, unchanged, until taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready && !abort_req |=> out_valid && $stable(out_word));

endmodule
