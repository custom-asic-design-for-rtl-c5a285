// sha256_io: input-output interface for the 32-bit bidirectional data bus.
//
// The same 32 pins carry the message words into the accelerator and the
// hash words out of it. Input: the word on the bus (data_i) is passed to
// the expander as din. Output: while rd is high the interface enables the
// bus driver (data_oe) and puts one hash word per clock on data_o, H0
// first, then H1 ... H7; a 3-bit read index advances at every clock edge
// with rd high and wraps from H7 to H0, so holding rd repeats the digest.
// The index returns to H0 whenever rd is low, so every read starts at H0
// and reading never changes the hash state. The tri-state driver itself is
// in the top level (data = data_oe ? data_o : 'z).
// The shared bus and the repeat-while-rd behaviour follow the document; the
// read index and its reset are choices of this design.
module sha256_io
  import sha256_pkg::*;
(
  input  logic   clk,
  input  logic   rst,     // synchronous master reset
  input  logic   rd,      // read the digest (only while the core is idle)
  input  state_t h,       // hash state H0..H7
  input  word_t  data_i,  // value on the bus
  output word_t  data_o,  // value to drive on the bus
  output logic   data_oe, // bus driver enable
  output word_t  din      // message word for the expander
);

  logic [$clog2(NWORDS)-1:0] ridx;

  always_ff @(posedge clk) begin
    if (rst || !rd) ridx <= '0;
    else            ridx <= ridx + 1'b1;
  end

  assign data_oe = rd;
  assign data_o  = h[ridx];
  assign din     = data_i;

endmodule
