// pdp9_memory: behavioural model of the PDP-9 core memory as seen by the
// data acquisition DMA, for testbenches only. A write request is
// acknowledged after a random 0..MAX_WAIT extra cycles (one cycle minimum);
// the model counts writes and keeps the words in an array the testbench reads
// directly. Memory is 32K 18-bit words, cleared at time zero.
`timescale 1ns/1ps
module pdp9_memory #(
  parameter int unsigned MAX_WAIT = 3
) (
  input  logic        clk,
  input  logic        mem_req,
  input  logic [14:0] mem_addr,
  input  logic [17:0] mem_wdata,
  output logic        mem_ack
);
  logic [17:0] mem [32768];
  int          writes = 0;
  int          wait_left = -1;

  initial begin
    for (int i = 0; i < 32768; i++) mem[i] = '0;
    mem_ack = 1'b0;
  end

  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      if (wait_left < 0) wait_left = $urandom_range(0, MAX_WAIT);
      if (wait_left == 0) begin
        mem[mem_addr] <= mem_wdata;
        writes++;
        mem_ack   <= 1'b1;
        wait_left = -1;
      end else begin
        wait_left--;
      end
    end
  end
endmodule
