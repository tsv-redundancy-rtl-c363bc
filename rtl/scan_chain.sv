// scan_chain: serial shift register that loads the repair pattern of one tier.
//
// While shift_en is high, every rising clock edge moves the chain one place:
// scan_in enters bit 0, bit i moves to bit i+1 and bit LEN-1 leaves on
// scan_out. Loading a LEN-bit pattern p therefore takes exactly LEN cycles,
// shifting p[LEN-1] first. The parallel outputs q feed the e-fuse array's
// programming inputs. Reset (rst_n low, asynchronous) clears the chain to 0.
// The source design only states that the fuses are programmed through a scan
// chain; the shift direction and the reset are this implementation's choices.
module scan_chain #(
  parameter int unsigned LEN = 490  // bits in the chain
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           scan_in,
  output logic           scan_out,
  output logic [LEN-1:0] q
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= {q[LEN-2:0], scan_in};

  assign scan_out = q[LEN-1];

  initial assert (LEN >= 2) else $error("scan_chain: LEN must be at least 2");

endmodule
