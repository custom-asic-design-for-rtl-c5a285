// tb_sha256_expander: feeds random message blocks into the expander (sel
// high for sixteen cycles, then low for forty-eight) and compares the word
// it produces in every cycle with the reference message schedule W_0..W_63.
// Several blocks run back to back, with idle cycles (en low) in between to
// check that the register holds.
module tb_sha256_expander;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;

  logic  clk = 0;
  logic  en, sel;
  word_t in, msg;
  int checks = 0, failures = 0;

  sha256_expander dut (.clk, .en, .sel, .in, .msg);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w32_t w [64];
    en = 0; sel = 0; in = '0;
    for (int blk = 0; blk < 8; blk++) begin
      for (int t = 0; t < 64; t++)
        w[t] = (t < 16) ? $urandom : ref_w(w[t-2], w[t-7], w[t-15], w[t-16]);
      for (int t = 0; t < 64; t++) begin
        @(negedge clk);
        en  = 1;
        sel = (t < 16);
        in  = (t < 16) ? w[t] : $urandom;  // bus is ignored after round 15
        #1;
        checks++;
        if (msg !== w[t]) begin
          failures++;
          $display("block %0d W[%0d] = %08h, expected %08h", blk, t, msg, w[t]);
        end
        // Pause mid-schedule once per block: en low must hold the register.
        if (t == 20 + blk) begin
          @(negedge clk);
          en = 0; sel = 0;
          @(negedge clk);
        end
      end
      @(negedge clk);
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
