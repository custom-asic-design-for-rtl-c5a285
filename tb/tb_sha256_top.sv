// tb_sha256_top: end-to-end test of the accelerator, acting as the host
// microcontroller. It pads each message itself, resets the core, sends
// every block (soc with W0, then W1..W15 on the shared data bus), waits
// for eoc and reads the digest with rd. Digests are compared with the two
// FIPS 180-4 examples ("abc", one block; the 56-character
// "abcdbcdecdef...nopq" message, two blocks) and with the reference model
// for random messages of 0 to 250 bytes (one to five blocks). Also checked:
// eoc rises exactly 65 clock edges after the soc edge (65 cycles per
// block), holding rd repeats H0..H7, and a reset in the middle of a
// message discards it. Each of these mechanisms is counted and must occur.
// The core has no parameters, so this runs at the full design size.
module tb_sha256_top;
  import sha256_ref_pkg::*;

  logic        clk = 0;
  logic        rst, soc, rd;
  wire  [31:0] data;
  logic        eoc;
  logic        host_drive;
  logic [31:0] host_word;
  int checks = 0, failures = 0;
  int n_single = 0, n_multi = 0, n_repeat = 0, n_abort = 0, n_gap = 0;

  assign data = host_drive ? host_word : 'z;

  sha256_top dut (.clk, .rst, .soc, .rd, .data, .eoc);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_reset();
    @(negedge clk);
    rst = 1; soc = 0; rd = 0; host_drive = 0;
    @(negedge clk);
    rst = 0;
  endtask

  // Sends one 16-word block and waits for eoc, checking the latency.
  task automatic send_block(w32_t words [$], int base);
    int edges = 0;
    @(negedge clk);
    soc = 1; host_drive = 1; host_word = words[base];
    for (int t = 1; t < 16; t++) begin
      @(negedge clk);
      soc = 0; host_word = words[base + t];
      checks++;
      if (eoc !== 0) begin
        failures++;
        $display("eoc high during block");
      end
    end
    @(negedge clk);
    host_drive = 0;
    edges = 16;
    while (!eoc && edges < 200) begin
      @(negedge clk);
      edges++;
    end
    checks++;
    if (edges != 65) begin
      failures++;
      $display("eoc after %0d cycles, expected 65", edges);
    end
  endtask

  // Reads the digest with rd held for ncycles (>= 8) and checks each word.
  task automatic read_digest(st_t exp, int ncycles, string what);
    @(negedge clk);
    rd = 1;
    for (int i = 0; i < ncycles; i++) begin
      #1;
      checks++;
      if (data !== exp[i % 8]) begin
        failures++;
        $display("%s: H%0d read %0d = %08h, expected %08h",
                 what, i % 8, i, data, exp[i % 8]);
      end
      @(negedge clk);
    end
    rd = 0;
    if (ncycles > 8) n_repeat++;
  endtask

  task automatic hash_msg(byte unsigned msg [$], output st_t exp, input int read_cycles,
                          input string what);
    w32_t words [$];
    int nblk;
    ref_pad(msg, words);
    nblk = words.size() / 16;
    exp = ref_init();
    do_reset();
    for (int b = 0; b < nblk; b++) begin
      blk_t m;
      for (int t = 0; t < 16; t++) m[t] = words[16 * b + t];
      exp = ref_block(exp, m);
      if (b > 0 && $urandom_range(0, 1)) begin
        repeat ($urandom_range(1, 4)) @(negedge clk);
        n_gap++;
      end
      send_block(words, 16 * b);
    end
    if (nblk == 1) n_single++; else n_multi++;
    read_digest(exp, read_cycles, what);
  endtask

  function automatic st_t to_st(logic [255:0] v);
    st_t s;
    for (int j = 0; j < 8; j++) s[j] = v[255 - 32 * j -: 32];
    return s;
  endfunction

  initial begin
    byte unsigned msg [$];
    st_t exp, fixed;
    rst = 0; soc = 0; rd = 0; host_drive = 0; host_word = '0;

    // FIPS 180-4 example 1.
    str_bytes("abc", msg);
    fixed = to_st(256'hba7816bf_8f01cfea_414140de_5dae2223_b00361a3_96177a9c_b410ff61_f20015ad);
    hash_msg(msg, exp, 20, "abc");
    checks++;
    if (exp != fixed) begin
      failures++;
      $display("reference model disagrees with the published digest of abc");
    end
    read_digest(fixed, 8, "abc vs published");

    // FIPS 180-4 example 2 (two blocks).
    str_bytes("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq", msg);
    fixed = to_st(256'h248d6a61_d20638b8_e5c02693_0c3e6039_a33ce459_64ff2167_f6ecedd4_19db06c1);
    hash_msg(msg, exp, 8, "two-block");
    checks++;
    if (exp != fixed) begin
      failures++;
      $display("reference model disagrees with the published two-block digest");
    end

    // Reset in the middle of a message, then a fresh message.
    begin
      w32_t words [$];
      str_bytes("discarded message", msg);
      ref_pad(msg, words);
      do_reset();
      @(negedge clk);
      soc = 1; host_drive = 1; host_word = words[0];
      for (int t = 1; t < 16; t++) begin
        @(negedge clk);
        soc = 0; host_word = words[t];
      end
      @(negedge clk);
      host_drive = 0;
      repeat (10) @(negedge clk);
      n_abort++;
      str_bytes("abc", msg);
      fixed = to_st(256'hba7816bf_8f01cfea_414140de_5dae2223_b00361a3_96177a9c_b410ff61_f20015ad);
      hash_msg(msg, exp, 8, "abc after abort");
    end

    // Random messages.
    for (int n = 0; n < 25; n++) begin
      int len;
      len = (n == 0) ? 0 : int'($urandom_range(1, 250));
      msg = {};
      for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
      hash_msg(msg, exp, 8 + 8 * (n % 2), $sformatf("random %0d (%0d bytes)", n, len));
    end

    $display("mechanisms: single-block %0d, multi-block %0d, repeated read-out %0d, reset abort %0d, gap between blocks %0d",
             n_single, n_multi, n_repeat, n_abort, n_gap);
    if (n_single == 0 || n_multi == 0 || n_repeat == 0 || n_abort == 0 || n_gap == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
