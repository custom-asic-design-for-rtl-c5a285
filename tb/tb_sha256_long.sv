// tb_sha256_long: long-message test of the accelerator at full size. It
// hashes two further FIPS 180-4 example messages and compares the digests
// with their published values:
//   * the 112-character "abcdefghbcdefghi...nopqrstu" message (two blocks,
//     where the padding needs a block of its own for the length), and
//   * one million repetitions of "a" (15,625 message blocks plus one
//     padding block), which runs every block back to back, starting each
//     block in the cycle after eoc rises.
// The padded words are generated on the fly rather than stored. The total
// number of clock cycles per block is checked against 65 plus the one
// cycle the host needs to see eoc.
module tb_sha256_long;
  import sha256_ref_pkg::*;

  logic        clk = 0;
  logic        rst, soc, rd;
  wire  [31:0] data;
  logic        eoc;
  logic        host_drive;
  logic [31:0] host_word;
  int checks = 0, failures = 0;

  assign data = host_drive ? host_word : 'z;

  sha256_top dut (.clk, .rst, .soc, .rd, .data, .eoc);

  always #5 clk = ~clk;

  initial begin
    repeat (1_300_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Word i of the padded message made of len_bytes bytes of value fill.
  function automatic w32_t pad_word(longint unsigned len_bytes, byte unsigned fill,
                                    longint unsigned i);
    w32_t w;
    longint unsigned nbytes_padded = ((len_bytes + 8) / 64 + 1) * 64;
    for (int j = 0; j < 4; j++) begin
      longint unsigned p = 4 * i + longint'(j);
      byte unsigned b;
      if (p < len_bytes)               b = fill;
      else if (p == len_bytes)         b = 8'h80;
      else if (p >= nbytes_padded - 8) b = 8'((len_bytes * 8) >> (8 * (nbytes_padded - 1 - p)));
      else                             b = 8'h00;
      w = {w[23:0], b};
    end
    return w;
  endfunction

  task automatic read_and_check(logic [255:0] exp, string what);
    @(negedge clk);
    rd = 1;
    for (int i = 0; i < 8; i++) begin
      #1;
      checks++;
      if (data !== exp[255 - 32 * i -: 32]) begin
        failures++;
        $display("%s: H%0d = %08h, expected %08h", what, i, data, exp[255 - 32 * i -: 32]);
      end
      @(negedge clk);
    end
    rd = 0;
  endtask

  task automatic send_block_words(w32_t words [16]);
    @(negedge clk);
    soc = 1; host_drive = 1; host_word = words[0];
    for (int t = 1; t < 16; t++) begin
      @(negedge clk);
      soc = 0; host_word = words[t];
    end
    @(negedge clk);
    host_drive = 0;
    while (!eoc) @(negedge clk);
  endtask

  initial begin
    byte unsigned msg [$];
    w32_t words [$];
    w32_t blk [16];
    longint unsigned nblk, len;
    longint start_cycle, cycles;
    rst = 0; soc = 0; rd = 0; host_drive = 0; host_word = '0;

    // 896-bit example.
    str_bytes({"abcdefghbcdefghicdefghijdefghijkefghijklfghijklmghijklmn",
               "hijklmnoijklmnopjklmnopqklmnopqrlmnopqrsmnopqrstnopqrstu"}, msg);
    ref_pad(msg, words);
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    for (int b = 0; b < words.size() / 16; b++) begin
      for (int t = 0; t < 16; t++) blk[t] = words[16 * b + t];
      send_block_words(blk);
    end
    read_and_check(256'hcf5b16a7_78af8380_036ce59e_7b049237_0b249b11_e8f07a51_afac4503_7afee9d1,
                   "896-bit message");

    // One million 'a'.
    len  = 1_000_000;
    nblk = (len + 8) / 64 + 1;
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    start_cycle = longint'($time / 10);
    for (longint unsigned b = 0; b < nblk; b++) begin
      for (int t = 0; t < 16; t++) blk[t] = pad_word(len, 8'h61, 16 * b + longint'(t));
      send_block_words(blk);
    end
    cycles = longint'($time / 10) - start_cycle;
    checks++;
    if (cycles != longint'(nblk) * 66) begin
      failures++;
      $display("%0d blocks took %0d cycles, expected %0d", nblk, cycles, nblk * 66);
    end
    $display("one million 'a': %0d blocks in %0d cycles", nblk, cycles);
    read_and_check(256'hcdc76e5c_9914fb92_81a1c7e2_84d73e67_f1809a48_a497200e_046d39cc_c7112cd0,
                   "one million a");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
