// tb_sha256_compressor: runs 64 rounds from a random hash state with random
// words and constants, and after every round compares a..h with the
// reference round function. The first round takes its inputs from h_in
// (first high), the others from the working registers. Also checks that
// the registers hold while en is low.
module tb_sha256_compressor;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;

  logic   clk = 0;
  logic   en, first;
  word_t  k, w;
  state_t h_in, x;
  int checks = 0, failures = 0;

  sha256_compressor dut (.clk, .en, .first, .k, .w, .h_in, .x);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(st_t exp, string what);
    checks++;
    for (int j = 0; j < 8; j++)
      if (x[j] !== exp[j]) begin
        failures++;
        $display("%s: x[%0d] = %08h, expected %08h", what, j, x[j], exp[j]);
        break;
      end
  endtask

  initial begin
    st_t s;
    en = 0; first = 0; k = '0; w = '0;
    for (int blk = 0; blk < 6; blk++) begin
      for (int j = 0; j < 8; j++) h_in[j] = $urandom;
      for (int j = 0; j < 8; j++) s[j] = h_in[j];
      for (int t = 0; t < 64; t++) begin
        @(negedge clk);
        en = 1; first = (t == 0);
        k = $urandom; w = $urandom;
        s = ref_round(s, k, w);
        // h_in changes during later rounds must not matter.
        if (t > 0) h_in[t % 8] = $urandom;
        @(posedge clk); #1;
        compare(s, $sformatf("block %0d round %0d", blk, t));
      end
      @(negedge clk);
      en = 0; first = 0; k = $urandom; w = $urandom;
      @(posedge clk); #1;
      compare(s, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
