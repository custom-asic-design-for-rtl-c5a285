// sha256_expander: SHA-256 message expander (message schedule).
//
// A 16-position, 32-bit shift register holds the last sixteen schedule words
// W_{t-16}..W_{t-1}. The output msg is W_t: while sel is high it is the
// external word on in (rounds 0..15, the message words M_t), otherwise it is
// computed as sigma1(W_{t-2}) + W_{t-7} + sigma0(W_{t-15}) + W_{t-16}
// (rounds 16..63). msg is combinational so the compressor can use it in the
// same cycle; on a clock edge with en high, msg is shifted into the register.
// The shift-register structure and the sel/in/msg signals follow the
// document; the enable input and the absence of a reset (the register is
// always filled with sixteen message words before it is read) are choices
// of this design.
module sha256_expander
  import sha256_pkg::*;
(
  input  logic  clk,
  input  logic  en,    // shift msg into the register
  input  logic  sel,   // 1: W_t = in, 0: W_t computed from the register
  input  word_t in,    // external message word
  output word_t msg    // W_t
);

  // w[15] is W_{t-1}, w[0] is W_{t-16}.
  word_t w [MSG_WORDS];

  always_comb begin
    if (sel) msg = in;
    else     msg = ssig1(w[14]) + w[9] + ssig0(w[1]) + w[0];
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int i = 0; i < MSG_WORDS - 1; i++) w[i] <= w[i+1];
      w[MSG_WORDS-1] <= msg;
    end
  end

endmodule
