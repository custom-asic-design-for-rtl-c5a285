// tb_sha256_state_reg: checks that reset loads H(0) (computed from the
// square roots of the first primes, independently of the RTL constant),
// that upd adds the working variables word by word modulo 2^32, that the
// state holds when neither is active, and that reset has priority over upd.
module tb_sha256_state_reg;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;

  logic   clk = 0;
  logic   rst, upd;
  state_t x, h;
  int checks = 0, failures = 0;

  sha256_state_reg dut (.clk, .rst, .upd, .x, .h);

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
      if (h[j] !== exp[j]) begin
        failures++;
        $display("%s: h[%0d] = %08h, expected %08h", what, j, h[j], exp[j]);
        break;
      end
  endtask

  task automatic step(logic r, logic u);
    @(negedge clk);
    rst = r; upd = u;
    @(posedge clk); #1;
    @(negedge clk);
    rst = 0; upd = 0;
  endtask

  initial begin
    st_t s;
    rst = 0; upd = 0;
    for (int j = 0; j < 8; j++) x[j] = $urandom;
    step(1, 1);                  // reset wins over upd
    s = ref_init();
    compare(s, "reset");
    for (int it = 0; it < 50; it++) begin
      for (int j = 0; j < 8; j++) x[j] = $urandom;
      // Carries out of bit 31 must be dropped: force some large operands.
      if (it % 5 == 0) for (int j = 0; j < 8; j++) x[j] = 32'hffffffff - 32'(j);
      step(0, 1);
      for (int j = 0; j < 8; j++) s[j] = s[j] + x[j];
      compare(s, $sformatf("update %0d", it));
      for (int j = 0; j < 8; j++) x[j] = $urandom;
      @(posedge clk); @(posedge clk); #1;
      compare(s, "hold");
      if (it == 25) begin
        step(1, 0);
        s = ref_init();
        compare(s, "second reset");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
