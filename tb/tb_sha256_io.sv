// tb_sha256_io: checks the bus interface on a tri-state bus built in the
// testbench as in the top level. With rd low the host drives words, which
// must reach din with the driver disabled. With rd high the interface must
// drive H0, H1, ..., H7 in successive cycles and start again at H0 after
// H7; dropping rd for a cycle and raising it again must restart at H0.
module tb_sha256_io;
  import sha256_pkg::*;

  logic        clk = 0;
  logic        rst, rd;
  state_t      h;
  word_t       data_o, din;
  logic        data_oe;
  wire  [31:0] data;
  logic        host_drive;
  word_t       host_word;
  int checks = 0, failures = 0;

  assign data = host_drive ? host_word : 'z;
  assign data = data_oe ? data_o : 'z;

  sha256_io dut (.clk, .rst, .rd, .h, .data_i(data), .data_o, .data_oe, .din);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; rd = 0; host_drive = 0; host_word = '0;
    for (int j = 0; j < 8; j++) h[j] = $urandom;
    @(negedge clk); rst = 0;
    for (int it = 0; it < 40; it++) begin
      int n = $urandom_range(1, 20);
      // Host writes.
      repeat (3) begin
        @(negedge clk);
        rd = 0; host_drive = 1; host_word = $urandom;
        #1;
        checks++;
        if (din !== host_word || data_oe !== 0) begin
          failures++;
          $display("write: din = %08h oe = %b, expected %08h", din, data_oe, host_word);
        end
      end
      for (int j = 0; j < 8; j++) h[j] = $urandom;
      // Host reads n words.
      @(negedge clk);
      host_drive = 0; rd = 1;
      for (int i = 0; i < n; i++) begin
        #1;
        checks++;
        if (data_oe !== 1 || data !== h[i % 8] || din !== h[i % 8]) begin
          failures++;
          $display("read %0d: data = %08h oe = %b, expected %08h", i, data, data_oe, h[i % 8]);
        end
        @(negedge clk);
      end
      rd = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
