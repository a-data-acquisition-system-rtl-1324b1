// spark_formatter: the formatting logic that turns one 32-bit chamber word
// into 18-bit spark words.
//
// On `load` the 32 sense bits are captured in a shift register together with
// the 7-bit board word address. A word with no bit set is finished at once
// (`done` one cycle later) so the scan can move to the next board. Otherwise
// the register shifts right once per clock (the gated 2.5 MHz clock of the
// original logic, here a clock enable) while two 5-bit counters run:
//   wire  : number of bit positions shifted so far; when a spark is emitted it
//           holds the 1-based position of the spark's last wire (mod 32),
//   width : number of adjacent set bits in the current spark (mod 32).
// A spark ends at the first clear bit after set bits, or when no set bit is
// left in the register; the word {0, board_word, wire, width} is then
// offered on out_valid/out_ready and held until taken. After each spark the
// logic tests whether the register still holds set bits: if not, the word is
// finished without shifting out the empty tail, otherwise it goes on to the
// next spark of the same word.
//
// A word of all ones (the test for '1') gives wire = 0 and width = 0, and a
// missing bit in it splits the word into two sparks, which is how failures are
// located. Field contents and the counter behaviour follow the system
// description; the handshake and the early finish of a zero tail are this
// design's choices.
//
// `flush` returns the logic to idle at once, dropping any spark not yet taken.
//
// Timing: a zero word takes 2 cycles from load to done; otherwise one cycle
// per shifted bit up to the last set bit, plus one cycle per emitted word
// while out_ready is high, plus one.
module spark_formatter
  import daq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,      // drop the word in progress (scan aborted)
  input  logic        load,
  input  logic [31:0] data_in,
  input  logic [6:0]  board_word,
  output logic        busy,
  output logic        done,       // one-cycle pulse: word finished
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_word
);

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_EMIT, S_FIN} state_t;

  state_t     state;
  logic [31:0] sr;
  logic [6:0]  bw;
  logic [4:0]  wire_cnt, width_cnt;
  logic [4:0]  em_wire, em_width;
  logic        in_spark;

  assign busy      = (state != S_IDLE);
  assign out_valid = (state == S_EMIT);
  assign out_word  = make_data_word(bw, em_wire, em_width);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sr        <= '0;
      bw        <= '0;
      wire_cnt  <= '0;
      width_cnt <= '0;
      em_wire   <= '0;
      em_width  <= '0;
      in_spark  <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (flush) begin
        state <= S_IDLE;
      end else unique case (state)
        S_IDLE: if (load) begin
          sr        <= data_in;
          bw        <= board_word;
          wire_cnt  <= '0;
          width_cnt <= '0;
          in_spark  <= 1'b0;
          state     <= (data_in == '0) ? S_FIN : S_SHIFT;
        end
        S_SHIFT: begin
          sr       <= sr >> 1;
          wire_cnt <= wire_cnt + 1'b1;
          if (sr[0]) begin
            width_cnt <= width_cnt + 1'b1;
            in_spark  <= 1'b1;
            if ((sr >> 1) == '0) begin          // last set bit of the word
              em_wire  <= wire_cnt + 1'b1;
              em_width <= width_cnt + 1'b1;
              state    <= S_EMIT;
            end
          end else if (in_spark) begin          // spark ended on previous bit
            em_wire  <= wire_cnt;
            em_width <= width_cnt;
            state    <= S_EMIT;
          end
        end
        S_EMIT: if (out_ready) begin
          width_cnt <= '0;
          in_spark  <= 1'b0;
          state     <= (sr == '0) ? S_FIN : S_SHIFT;
        end
        S_FIN: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A spark word offered and not taken stays offered, unchanged.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready && !flush |=> out_valid && $stable(out_word));

endmodule
