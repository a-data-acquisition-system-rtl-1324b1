// sense_cable: the hardwired OR of sense lines of like binary weight.
//
// All readout cards of a group of planes share one 32-conductor cable; each
// conductor carries the OR of the same bit of every card, and only the card
// that is addressed and read drives anything onto it. The line ends in a
// comparator that restores logic levels; here the lines are already logic
// levels, so the cable is the OR of its N inputs, purely combinational.
// The same module also merges the cables of the plane groups into the one
// 32-bit word the formatting logic receives (this merge is a choice of this
// design: only the plane being read ever drives a line).
module sense_cable #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0][31:0] board_sense,
  output logic [31:0]        line
);

  always_comb begin
    line = '0;
    for (int i = 0; i < N; i++) line |= board_sense[i];
  end

endmodule
