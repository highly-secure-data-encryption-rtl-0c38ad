// aes_encrypt_tb: known-answer tests of the AES-128 encryption engine
// (FIPS-197 Appendix B and C.1, plus three vectors from an independent
// software model), with round keys from aes_key_expand. Also checks that
// done comes exactly 10 cycles after start and that dout holds afterwards.
module aes_encrypt_tb;
  import aes_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b1;
  logic   kstart = 1'b0, start = 1'b0;
  block_t key = '0, din = '0;
  logic   ready, busy, done;
  block_t rk [0:NR];
  block_t dout;
  int     checks = 0, failures = 0;

  aes_key_expand u_kx (.clk, .rst_n, .start(kstart), .key, .ready, .rk);
  aes_encrypt dut (.clk, .rst_n, .start, .din, .rk, .busy, .done, .dout);

  always #5ns clk = ~clk;

  localparam block_t VK [5] = '{128'h2b7e151628aed2a6abf7158809cf4f3c,
    128'h000102030405060708090a0b0c0d0e0f,
    128'ha54dca182530bb1d6d132cded6237b2e,
    128'h3460be31201e69fedaa0eee8b9997f5c,
    128'h27a0aeb3fee9232f8af2211f9ee491c5};
  localparam block_t VP [5] = '{128'h3243f6a8885a308d313198a2e0370734,
    128'h00112233445566778899aabbccddeeff,
    128'hd91e3f721fcb1971174494d6493c9d5c,
    128'h7c2999fdafe593253cd654af4dfad714,
    128'hb10becb5563bfc1e6f93427ecbc8fe29};
  localparam block_t VC [5] = '{128'h3925841d02dc09fbdc118597196a0b32,
    128'h69c4e0d86a7b0430d8cdb78070b4c55a,
    128'h6c8b37ec6d39a6b066960cab525ef485,
    128'hc224c765d96eb6f9baefef7843950b7d,
    128'hf0c45812d8eb7a703ed725725eb4b89c};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int cyc;
    #1ps rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      key = VK[i]; kstart = 1'b1;
      @(negedge clk);
      kstart = 1'b0;
      while (!ready) @(negedge clk);
      din = VP[i]; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      din = '0;
      cyc = 0;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc == 10, $sformatf("vector %0d: done after %0d cycles, expected 10", i, cyc));
      check(dout == VC[i], $sformatf("vector %0d: dout %h expected %h", i, dout, VC[i]));
      repeat (3) @(negedge clk);
      check(dout == VC[i] && !busy, $sformatf("vector %0d: result not held", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
