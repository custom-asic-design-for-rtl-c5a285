// sha256_counter: 7-bit synchronous counter that sequences one message
// block and derives every internal control signal.
//
// The count is the round index. While idle it rests at IDLE (65). A start
// pulse (soc while idle) runs round 0 in that same cycle and loads 1; the
// counter then steps through rounds 1..63, one per clock, and reaches 64,
// the cycle in which the state register adds the working variables. It then
// returns to IDLE and raises eoc. A block therefore takes 65 clock cycles
// from the soc cycle to the update, and eoc is high from the following
// cycle until the next soc or rst.
//   addr  : ROM address = round index (0 during the soc cycle)
//   en    : a round runs (expander shift and compressor step)
//   first : round 0, working variables come from the hash state
//   sel   : rounds 0..15, W_t is taken from the data bus
//   upd   : hash state update cycle
//   idle  : no block in progress (reading the digest is allowed)
// The 7-bit width and the role of the counter follow the document; the
// count encoding and the exact decode are this design's own.
module sha256_counter
  import sha256_pkg::*;
(
  input  logic       clk,
  input  logic       rst,   // synchronous master reset
  input  logic       soc,   // start of computation
  output logic [5:0] addr,
  output logic       en,
  output logic       first,
  output logic       sel,
  output logic       upd,
  output logic       idle,
  output logic       eoc
);

  localparam logic [6:0] UPD_CNT  = 7'(NROUNDS);      // 64
  localparam logic [6:0] IDLE_CNT = 7'(NROUNDS + 1);  // 65

  logic [6:0] cnt;
  logic       start;
  logic       running;

  always_comb begin
    idle    = (cnt == IDLE_CNT);
    start   = soc && idle;
    running = (cnt != 7'd0) && (cnt < UPD_CNT);
    first   = start;
    en      = start || running;
    addr    = start ? 6'd0 : cnt[5:0];
    sel     = start || (running && cnt < 7'(MSG_WORDS));
    upd     = (cnt == UPD_CNT);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= IDLE_CNT;
      eoc <= 1'b0;
    end else begin
      if (start) begin
        cnt <= 7'd1;
        eoc <= 1'b0;
      end else if (running) begin
        cnt <= cnt + 7'd1;
      end else if (upd) begin
        cnt <= IDLE_CNT;
        eoc <= 1'b1;
      end
    end
  end

  // A new block may only be started once the previous one has finished.
  assert property (@(posedge clk) disable iff (rst) soc |-> idle)
    else $error("soc asserted while a block is being computed");

endmodule
