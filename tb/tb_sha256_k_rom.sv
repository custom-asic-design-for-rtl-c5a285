// tb_sha256_k_rom: reads all 64 addresses of the constant ROM and compares
// each word with the constant computed from its definition (cube root of
// the t-th prime) by the reference package. Also checks that the ROM reads
// asynchronously: the output follows a new address with no clock.
module tb_sha256_k_rom;
  import sha256_ref_pkg::*;

  logic [5:0]  addr;
  logic [31:0] k;
  int checks = 0, failures = 0;

  sha256_k_rom dut (.addr, .k);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 64; t++) begin
      addr = 6'(t);
      #1;
      checks++;
      if (k !== ref_k(t)) begin
        failures++;
        $display("K[%0d] = %08h, expected %08h", t, k, ref_k(t));
      end
    end
    // Reverse order, to be sure nothing depends on the previous address.
    for (int t = 63; t >= 0; t--) begin
      addr = 6'(t);
      #1;
      checks++;
      if (k !== ref_k(t)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
