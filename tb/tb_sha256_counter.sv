// tb_sha256_counter: checks the control sequence of one block cycle by
// cycle against an independent model of the intended timing: in the soc
// cycle round 0 runs with first and sel high; rounds 1..63 follow with the
// ROM address equal to the round and sel high up to round 15; the update
// comes in the 65th cycle counted from soc; eoc rises after it and falls
// at the next soc or at reset. Blocks are started after random idle gaps,
// and a reset in the middle of a block is checked to return to idle.
module tb_sha256_counter;
  logic       clk = 0;
  logic       rst, soc;
  logic [5:0] addr;
  logic       en, first, sel, upd, idle, eoc;
  int checks = 0, failures = 0;

  sha256_counter dut (.clk, .rst, .soc, .addr, .en, .first, .sel, .upd, .idle, .eoc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compares all outputs in the current cycle (sampled before the edge).
  task automatic expect_ctl(logic [5:0] a, logic e, logic f, logic s,
                            logic u, logic i, logic c, string what);
    checks++;
    if ((e && addr !== a) || en !== e || first !== f || sel !== s ||
        upd !== u || idle !== i || eoc !== c) begin
      failures++;
      $display("%s: addr=%0d en=%b first=%b sel=%b upd=%b idle=%b eoc=%b",
               what, addr, en, first, sel, upd, idle, eoc);
    end
  endtask

  task automatic run_block(logic eoc_before);
    int cycles = 0;
    @(negedge clk);
    soc = 1; #1;
    expect_ctl(0, 1, 1, 1, 0, 1, eoc_before, "soc cycle");
    @(negedge clk);
    soc = 0;
    cycles = 1;
    for (int t = 1; t < 64; t++) begin
      #1;
      expect_ctl(6'(t), 1, 0, (t < 16), 0, 0, 0, $sformatf("round %0d", t));
      @(negedge clk);
      cycles++;
    end
    #1;
    expect_ctl(0, 0, 0, 0, 1, 0, 0, "update");
    cycles++;
    checks++;
    if (cycles != 65) begin
      failures++;
      $display("block took %0d cycles, expected 65", cycles);
    end
    @(negedge clk); #1;
    expect_ctl(0, 0, 0, 0, 0, 1, 1, "done");
  endtask

  initial begin
    rst = 1; soc = 0;
    @(negedge clk); @(negedge clk);
    rst = 0; #1;
    expect_ctl(0, 0, 0, 0, 0, 1, 0, "after reset");
    run_block(0);
    for (int b = 0; b < 5; b++) begin
      repeat ($urandom_range(0, 5)) begin
        @(negedge clk); #1;
        expect_ctl(0, 0, 0, 0, 0, 1, 1, "idle gap");
      end
      run_block(1);
    end
    // Reset in the middle of a block.
    @(negedge clk); soc = 1;
    @(negedge clk); soc = 0;
    repeat (20) @(negedge clk);
    rst = 1;
    @(negedge clk); rst = 0; #1;
    expect_ctl(0, 0, 0, 0, 0, 1, 0, "reset mid-block");
    run_block(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
