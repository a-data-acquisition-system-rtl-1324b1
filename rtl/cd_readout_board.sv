// cd_readout_board: one capacitor-diode readout card serving 64 chamber wires.
//
// Each wire charges a storage capacitor when it carries a spark. The card is
// organised as two 32-bit words, EVEN (wires 0..31 of the card, elements
// cap[31:0]) and ODD (cap[63:32]). A 6-bit board address is compared with the
// card's own number; when the card is addressed, READ EVEN or READ ODD
// interrogates one word and the charged elements appear on the 32 SENSE lines
// (combinational, for the wired OR of the sense cable). CLEAR discharges all
// elements.
//
// Test charging: a drive pulse on the READ terminals that lasts long enough
// (about 15 us against the 1 us of a normal READ) charges every element it
// drives. The card counts how many consecutive cycles each word has been
// driven and sets the whole word once TEST_CHARGE_CYCLES is reached. The
// plane-wide TEST input drives both words of the card whatever the address,
// which is how a whole plane is charged for the test for '1'.
//
// The capacitor is modelled as one flip-flop per wire: a spark pulse sets it,
// CLEAR (or reset) empties it, and reading does not discharge it. The analog
// thresholds, leakage and the sense pulse shape are not modelled. Charging by
// duration and the two-word organisation follow the system description; the
// non-destructive read and the plane-wide TEST input are this design's choices.
module cd_readout_board #(
  parameter logic [5:0]  BOARD_ID           = 6'd0,
  parameter int unsigned TEST_CHARGE_CYCLES = 38    // 15 us at 2.5 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] spark,      // spark pulse per wire
  input  logic [5:0]  addr,       // board address bus
  input  logic        read_even,  // READ EVEN (bit 7 low)
  input  logic        read_odd,   // READ ODD  (bit 7 high)
  input  logic        test,       // plane-wide test drive
  input  logic        clear,      // discharge all elements
  output logic [31:0] sense       // to the wired-OR sense cable
);

  localparam int unsigned CW = $clog2(TEST_CHARGE_CYCLES + 1);

  logic [63:0]   cap;
  logic          selected;
  logic          drive_even, drive_odd;
  logic [CW-1:0] len_even, len_odd;

  assign selected   = (addr == BOARD_ID);
  assign drive_even = (selected && read_even) || test;
  assign drive_odd  = (selected && read_odd)  || test;

  // Duration of the current drive pulse on each word, saturating.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_even <= '0;
      len_odd  <= '0;
    end else begin
      if (!drive_even)                           len_even <= '0;
      else if (len_even != CW'(TEST_CHARGE_CYCLES)) len_even <= len_even + 1'b1;
      if (!drive_odd)                            len_odd  <= '0;
      else if (len_odd != CW'(TEST_CHARGE_CYCLES))  len_odd  <= len_odd + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap <= '0;
    end else if (clear) begin
      cap <= '0;
    end else begin
      cap <= cap | spark;
      if (len_even == CW'(TEST_CHARGE_CYCLES - 1) && drive_even) cap[31:0]  <= '1;
      if (len_odd  == CW'(TEST_CHARGE_CYCLES - 1) && drive_odd)  cap[63:32] <= '1;
    end
  end

  always_comb begin
    sense = '0;
    if (selected && read_even && !test) sense |= cap[31:0];
    if (selected && read_odd  && !test) sense |= cap[63:32];
  end

endmodule
