// sha256_top: SHA-256 hash accelerator for a 32-bit microcontroller.
//
// The host pads the message and splits it into 512-bit blocks (sixteen
// 32-bit words); this core runs the expansion and the 64 compression rounds
// of each block and keeps the running hash.
// Operation:
//   1. Pulse rst for one cycle: the hash state is set to H(0), eoc goes low.
//   2. For each block, hold soc high for one cycle with W0 on data, then put
//      W1..W15 on data in the next fifteen cycles. Rounds 16..63 follow on
//      their own; 65 cycles after the soc cycle the intermediate hash is
//      updated and eoc rises. A further block is started with soc once eoc
//      is high (no reset between blocks).
//   3. After the last block, hold rd high: the core drives data with H0,
//      H1, ..., H7 on successive cycles (the word for a cycle is visible
//      during that cycle and advances at its clock edge). Keeping rd high
//      repeats the digest from H0.
// Blocks: counter (control and ROM address), constant ROM, expander,
// compressor, state register and the bus interface. The architecture is
// the canonical, unpipelined one, one round per clock.
module sha256_top
  import sha256_pkg::*;
(
  input  logic              clk,
  input  logic              rst,    // synchronous master reset
  input  logic              soc,    // start of computation (one cycle)
  input  logic              rd,     // read the digest
  inout  tri   [WORD_W-1:0] data,   // message in / hash out
  output logic              eoc     // end of computation
);

  logic       en, first, sel, upd, idle;
  logic [5:0] addr;
  logic       rd_ok, data_oe;
  word_t      k, din, msg, data_o;
  state_t     x, h;

  // The digest is only read out while no block is in progress.
  assign rd_ok = rd && idle && !soc;

  sha256_counter u_counter (
    .clk, .rst, .soc, .addr, .en, .first, .sel, .upd, .idle, .eoc
  );

  sha256_k_rom u_rom (.addr, .k);

  sha256_io u_io (
    .clk, .rst, .rd(rd_ok), .h, .data_i(data), .data_o, .data_oe, .din
  );

  // Tri-state bus driver.
  assign data = data_oe ? data_o : 'z;

  sha256_expander u_expander (.clk, .en, .sel, .in(din), .msg);

  sha256_compressor u_compressor (
    .clk, .en, .first, .k, .w(msg), .h_in(h), .x
  );

  sha256_state_reg u_state (.clk, .rst, .upd, .x, .h);

endmodule
