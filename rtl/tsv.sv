// tsv: behavioural model of one through-silicon via with its bond pad.
//
// This is not synthesizable logic: a TSV is a vertical copper or tungsten
// conductor through the thinned upper die, bonded to a pad on the die below.
// Electrically it is a wire from the driving tier (d) to the receiving tier
// (q). Misalignment or a bad bond opens the connection; the model then
// delivers the constant OPEN_VALUE (in a two-state simulation an open input
// has to read as some fixed level) whatever is driven. The fail input is a
// defect-injection control for simulation and has no physical counterpart.
// Timing: zero delay.
module tsv #(
  parameter bit OPEN_VALUE = 1'b0  // level a floating receiver input reads
) (
  input  logic d,     // driven by the sender tier
  input  logic fail,  // 1: the via or its bond is open
  output logic q      // seen by the receiver tier
);

  assign q = fail ? OPEN_VALUE : d;

endmodule
