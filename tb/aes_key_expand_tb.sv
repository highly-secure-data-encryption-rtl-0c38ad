// aes_key_expand_tb: checks the AES-128 key schedule against the FIPS-197
// Appendix A.1 expansion of key 2b7e1516...09cf4f3c (all eleven round keys),
// checks that ready rises exactly 10 cycles after start and drops during a
// re-expansion, and that a second key gives its own schedule.
module aes_key_expand_tb;
  import aes_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b1;
  logic   start = 1'b0;
  block_t key = '0;
  logic   ready;
  block_t rk [0:NR];
  int     checks = 0, failures = 0;

  aes_key_expand dut (.*);

  always #5ns clk = ~clk;

  localparam block_t EXP [0:NR] = '{
    128'h2b7e151628aed2a6abf7158809cf4f3c, 128'ha0fafe1788542cb123a339392a6c7605,
    128'hf2c295f27a96b9435935807a7359f67f, 128'h3d80477d4716fe3e1e237e446d7a883b,
    128'hef44a541a8525b7fb671253bdb0bad00, 128'hd4d1c6f87c839d87caf2b8bc11f915bc,
    128'h6d88a37a110b3efddbf98641ca0093fd, 128'h4e54f70e5f5fc9f384a64fb24ea6dc4f,
    128'head27321b58dbad2312bf5607f8d292f, 128'hac7766f319fadc2128d12941575c006e,
    128'hd014f9a8c9ee2589e13f0cc8b6630ca6};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic expand(input block_t k, output int cycles);
    @(negedge clk);
    key   = k;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    check(!ready, "ready low during expansion");
    while (!ready) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cyc;
    #1ps rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c, cyc);
    check(cyc == 10, $sformatf("ready %0d cycles after the start edge, expected 10", cyc));
    for (int i = 0; i <= NR; i++)
      check(rk[i] == EXP[i], $sformatf("round key %0d = %h, expected %h", i, rk[i], EXP[i]));
    // FIPS-197 C.1 key: round key 10 is 13111d7fe3944a17f307a78b4d2b30c5
    expand(128'h000102030405060708090a0b0c0d0e0f, cyc);
    check(rk[0] == 128'h000102030405060708090a0b0c0d0e0f, "C.1 round key 0");
    check(rk[10] == 128'h13111d7fe3944a17f307a78b4d2b30c5, $sformatf("C.1 round key 10 = %h", rk[10]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
