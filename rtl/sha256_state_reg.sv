// sha256_state_reg: hash state register H0..H7.
//
// Holds the intermediate hash H(i). On rst it loads the initial value H(0).
// On upd (the cycle after round 63) every word adds the matching working
// variable, H_j <= H_j + X_j, which gives H(i) of the block-hashing loop;
// after the last block it holds the digest, which the bus interface reads.
// h is also the starting point of the working variables of the next block.
// Initialising, keeping the intermediate hashes and supplying the digest
// follow the document; the synchronous, active-high reset (with priority
// over upd) is a choice of this design.
module sha256_state_reg
  import sha256_pkg::*;
(
  input  logic   clk,
  input  logic   rst,   // synchronous: load H(0)
  input  logic   upd,   // add the working variables x
  input  state_t x,     // working variables a..h
  output state_t h      // H0..H7
);

  always_ff @(posedge clk) begin
    if (rst) begin
      h <= IV;
    end else if (upd) begin
      for (int j = 0; j < NWORDS; j++) h[j] <= h[j] + x[j];
    end
  end

endmodule
