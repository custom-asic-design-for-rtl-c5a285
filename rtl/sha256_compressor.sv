// sha256_compressor: SHA-256 compression round with working registers a..h.
//
// One round of Algorithm 2 is computed per clock when en is high:
//   T1 = h + Sigma1(e) + Ch(e,f,g) + K_t + W_t,  T2 = Sigma0(a) + Maj(a,b,c)
//   h<=g, g<=f, f<=e, e<=d+T1, d<=c, c<=b, b<=a, a<=T1+T2.
// When first is high the round takes its inputs from the hash state h_in
// (H(i-1)) instead of the working registers; this is how the working
// variables are initialised without spending a cycle, so round 0 runs in the
// start cycle and a block takes 64 round cycles plus one update cycle.
// x is the current content of a..h (index 0 = a), read by the state
// register at the end of the block. Round logic follows the document; the
// bypass for initialisation and the enable are choices of this design.
module sha256_compressor
  import sha256_pkg::*;
(
  input  logic   clk,
  input  logic   en,     // perform one round this cycle
  input  logic   first,  // round 0: take a..h from h_in
  input  word_t  k,      // K_t from the constant ROM
  input  word_t  w,      // W_t from the expander
  input  state_t h_in,   // intermediate hash H(i-1)
  output state_t x       // working variables a..h
);

  state_t v;       // round inputs
  state_t nxt;     // round outputs
  word_t  t1, t2;

  always_comb begin
    v   = first ? h_in : x;
    t1  = v[7] + bsig1(v[4]) + ch(v[4], v[5], v[6]) + k + w;
    t2  = bsig0(v[0]) + maj(v[0], v[1], v[2]);
    nxt[7] = v[6];
    nxt[6] = v[5];
    nxt[5] = v[4];
    nxt[4] = v[3] + t1;
    nxt[3] = v[2];
    nxt[2] = v[1];
    nxt[1] = v[0];
    nxt[0] = t1 + t2;
  end

  always_ff @(posedge clk) begin
    if (en) x <= nxt;
  end

endmodule
