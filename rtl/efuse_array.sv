// efuse_array: behavioural model of a one-time-programmable e-fuse array.
//
// This is not synthesizable logic: e-fuses are a process-specific macro. The
// model keeps the behaviour the redundancy scheme relies on. Every fuse reads 0
// until it is blown, so all shift MUXes start in their unshifted position. A
// programming strobe (prog high at a rising clock edge) blows every fuse whose
// prog_data bit is 1; a blown fuse reads 1 for good. Fuses are never cleared:
// reset does not touch them and a later strobe can only blow more fuses.
// Programming time is modelled as a single clock cycle; fuse reflects the new
// state from the edge after the strobe. The strobe, its one-cycle duration and
// the data bus are this model's choices. The storage uses an initial block for
// its power-up state and a plain always block for blowing, as a model of a
// macro rather than a flip-flop description.
module efuse_array #(
  parameter int unsigned NBITS = 490  // number of fuses
) (
  input  logic             clk,
  input  logic             prog,
  input  logic [NBITS-1:0] prog_data,
  output logic [NBITS-1:0] fuse
);

  logic [NBITS-1:0] blown;

  initial blown = '0;  // an unprogrammed array reads all zeros

  always @(posedge clk)
    if (prog) blown <= blown | prog_data;

  assign fuse = blown;

endmodule
