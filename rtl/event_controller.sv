// event_controller: sequences the hardware for one event, and for the two
// self tests, under the fast trigger logic and the computer.
//
// An EVENT pulse from the fast selection logic (ignored while busy), a
// SIMULATE EVENT command (test for '0') or the end of a test-for-'1' charge
// starts a readout cycle:
//   1. `inhibit` goes high and stays high until the computer has taken the
//      block, the run number counter steps, and the DMA is preset;
//   2. the chamber scan runs until END-OF-CHAMBER (chamber_done);
//   3. the counter scan runs until END-OF-EVENT (counter_done);
//   4. the DMA writes the word count in front of the block;
//   5. an API request is raised and held until `api_ack`, the program's
//      signal that the block has been copied to a buffer.
// If the DMA reports OVERFLOW during 2 or 3 both scans are aborted and the
// cycle goes straight to 4 and 5; `api_overflow` tells the program why.
//
// Test for '1': TEST_ONE drives the plane-wide test line of plane
// `test_plane` for TEST_PULSE_CYCLES (about 15 us), then waits
// test_delay * TEST_DELAY_UNIT cycles (0.35 ms steps, 63 steps = 22 ms) and
// starts a readout cycle as for an event.
//
// The sequence, the inhibit, the run number counter, the API request on
// END-OF-EVENT or OVERFLOW and the two tests follow the system description.
// The abort on overflow, the delay step, the 18-bit run number and that every
// readout cycle (test ones too) steps the run number are this design's choices.
module event_controller #(
  parameter int unsigned TEST_PULSE_CYCLES = 38,    // 15 us at 2.5 MHz
  parameter int unsigned TEST_DELAY_UNIT   = 875    // 0.35 ms at 2.5 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  // fast logic
  input  logic        event_in,
  output logic        inhibit,
  output logic [17:0] run_number,
  // commands (from the peripheral device)
  input  logic        sim_event,
  input  logic        test_one,
  input  logic [4:0]  test_plane,
  input  logic [5:0]  test_delay,
  output logic        test_drive,
  output logic [4:0]  test_drive_plane,
  // data acquisition blocks
  output logic        dma_preset,
  output logic        chamber_start,
  input  logic        chamber_done,
  output logic        counter_start,
  input  logic        counter_done,
  output logic        abort_scans,
  input  logic        dma_overflow,
  output logic        dma_write_count,
  input  logic        dma_count_done,
  // computer
  output logic        api_req,
  output logic        api_overflow,
  input  logic        api_ack
);

  typedef enum logic [2:0] {S_IDLE, S_CHARGE, S_DELAY, S_START, S_CHAMBER,
                            S_COUNTERS, S_WRCOUNT, S_API} state_t;

  localparam int unsigned DW = $clog2(63 * TEST_DELAY_UNIT + TEST_PULSE_CYCLES + 2);

  state_t        state;
  logic [DW-1:0] tmr;

  assign inhibit          = (state != S_IDLE);
  assign test_drive       = (state == S_CHARGE);
  assign dma_preset       = (state == S_START);
  assign chamber_start    = (state == S_START);
  assign api_req          = (state == S_API);
  assign dma_write_count  = (state == S_WRCOUNT);   // held until count_done
  assign abort_scans      = dma_overflow && (state == S_CHAMBER || state == S_COUNTERS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      tmr              <= '0;
      run_number       <= '0;
      test_drive_plane <= 5'd1;
      counter_start    <= 1'b0;
      api_overflow     <= 1'b0;
    end else begin
      counter_start   <= 1'b0;
      unique case (state)
        S_IDLE: begin
          tmr <= '0;
          if (event_in || sim_event) begin
            state <= S_START;
          end else if (test_one) begin
            test_drive_plane <= test_plane;
            state            <= S_CHARGE;
          end
        end
        S_CHARGE: begin
          tmr <= tmr + 1'b1;
          if (tmr == DW'(TEST_PULSE_CYCLES - 1)) begin
            tmr   <= DW'(test_delay) * DW'(TEST_DELAY_UNIT);
            state <= S_DELAY;
          end
        end
        S_DELAY: begin
          if (tmr == '0) state <= S_START;
          else           tmr   <= tmr - 1'b1;
        end
        S_START: begin
          run_number   <= run_number + 1'b1;
          api_overflow <= 1'b0;
          state        <= S_CHAMBER;
        end
        S_CHAMBER: begin
          if (dma_overflow) begin
            api_overflow    <= 1'b1;
            state           <= S_WRCOUNT;
          end else if (chamber_done) begin
            counter_start <= 1'b1;
            state         <= S_COUNTERS;
          end
        end
        S_COUNTERS: begin
          if (dma_overflow) begin
            api_overflow    <= 1'b1;
            state           <= S_WRCOUNT;
          end else if (counter_done) begin
            state           <= S_WRCOUNT;
          end
        end
        S_WRCOUNT: if (dma_count_done) state <= S_API;
        S_API:     if (api_ack) state <= S_IDLE;
        default:   state <= S_IDLE;
      endcase
    end
  end

endmodule
