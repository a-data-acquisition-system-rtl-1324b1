// majority_logic: the 3-input majority coincidence unit used in the
// time-of-flight checkout.
//
// The output is high while at least THRESHOLD of the N_IN inputs are high.
// Set to a 2-fold coincidence with three inputs, a steady level on one input
// (a NIM level from the peripheral device) lets a single pulse on either other
// input through, while with the level low both must coincide; this is how
// the program switches the test pulse between two delay paths. The unit is
// purely combinational; pulse widths and the resolving time of the real
// coincidence unit are not modelled. Three inputs and the 2-fold setting
// follow the original setup; making the threshold a parameter is this
// design's choice.
module majority_logic #(
  parameter int unsigned N_IN      = 3,
  parameter int unsigned THRESHOLD = 2
) (
  input  logic [N_IN-1:0] in,
  output logic            out
);

  localparam int unsigned CW = $clog2(N_IN + 1);

  logic [CW-1:0] n_high;

  always_comb begin
    n_high = '0;
    for (int i = 0; i < N_IN; i++) n_high += CW'(in[i]);
  end

  assign out = (n_high >= CW'(THRESHOLD));

endmodule
