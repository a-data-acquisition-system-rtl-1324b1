// dma_channel: writes the event block into PDP-9 memory.
//
// `preset` (from the EVENT pulse) sets the address register to octal 1001 and
// the word count to zero and clears OVERFLOW. Each word offered on
// in_valid/in_ready is written at the address register with a memory request
// (mem_req held until mem_ack), after which address and count step. A word
// that would land beyond LAST_ADDR is not written: OVERFLOW is set instead
// and further words are accepted and dropped so no source can hang.
// `write_count` (END-OF-EVENT) stores the word count at octal 1000, the word
// in front of the block (write_count is a level, taken when the channel is
// idle), and `count_done` is high in the cycle the memory acknowledges it, so
// the block carries its own size for the program that copies it away.
//
// The two addresses and the count word follow the system description. The
// block's upper end (octal 7777, a 3583-word block) and the request/acknowledge
// memory handshake are this design's choices. One word takes 2 cycles plus the
// memory's acknowledge latency.
module dma_channel
  import daq_pkg::*;
#(
  parameter logic [ADDR_W-1:0] FIRST_ADDR = DMA_FIRST_ADDR,
  parameter logic [ADDR_W-1:0] COUNT_ADDR = DMA_COUNT_ADDR,
  parameter logic [ADDR_W-1:0] LAST_ADDR  = DMA_LAST_ADDR
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              preset,
  input  logic              in_valid,
  output logic              in_ready,
  input  word_t             in_word,
  input  logic              write_count,
  output logic              count_done,
  output logic              overflow,
  output word_t             word_count,
  // PDP-9 memory port
  output logic              mem_req,
  output logic [ADDR_W-1:0] mem_addr,
  output word_t             mem_wdata,
  input  logic              mem_ack
);

  typedef enum logic [1:0] {S_IDLE, S_WORD, S_COUNT} state_t;

  state_t            state;
  logic [ADDR_W-1:0] addr_reg;
  word_t             data_reg;

  assign in_ready = (state == S_IDLE) && !write_count && !preset;
  assign mem_req  = (state != S_IDLE);
  assign count_done = (state == S_COUNT) && mem_ack;
  assign mem_addr = (state == S_COUNT) ? COUNT_ADDR : addr_reg;
  assign mem_wdata = (state == S_COUNT) ? word_count : data_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      addr_reg   <= FIRST_ADDR;
      data_reg   <= '0;
      word_count <= '0;
      overflow   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (preset) begin
            addr_reg   <= FIRST_ADDR;
            word_count <= '0;
            overflow   <= 1'b0;
          end else if (write_count) begin
            state <= S_COUNT;
          end else if (in_valid) begin
            if (overflow || addr_reg > LAST_ADDR || addr_reg < FIRST_ADDR) begin
              overflow <= 1'b1;           // block full: word dropped
            end else begin
              data_reg <= in_word;
              state    <= S_WORD;
            end
          end
        end
        S_WORD: if (mem_ack) begin
          addr_reg   <= addr_reg + 1'b1;
          word_count <= word_count + 1'b1;
          state      <= S_IDLE;
        end
        S_COUNT: if (mem_ack) begin
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A memory request is held, with address and data, until acknowledged.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req && !mem_ack |=> mem_req && $stable(mem_addr) && $stable(mem_wdata));

endmodule
