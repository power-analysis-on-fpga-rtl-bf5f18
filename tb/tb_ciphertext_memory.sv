// tb_ciphertext_memory: writes the 96 bytes of a random 768-bit ciphertext, one
// byte per address {bank, byte}, and checks that cipher shows every bit one
// read-clock cycle later, and that a later single-byte rewrite changes only
// that byte.
module tb_ciphertext_memory;
  logic usb_clk = 0, crypt_clk = 0, we = 0;
  logic [6:0] addr;
  logic [7:0] wdata;
  logic [767:0] cipher;
  logic [783:0] ref_v;
  int checks = 0, failures = 0;

  always #5 usb_clk = ~usb_clk;
  always #7 crypt_clk = ~crypt_clk;

  ciphertext_memory dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, logic [7:0] d);
    @(negedge usb_clk); we = 1; addr = 7'(a); wdata = d;
    @(negedge usb_clk); we = 0;
  endtask

  initial begin
    for (int b = 0; b < 96; b++) ref_v[8*b +: 8] = 8'($urandom);
    for (int b = 0; b < 96; b++) wr(b, ref_v[8*b +: 8]);
    repeat (3) @(posedge crypt_clk);
    checks++;
    if (cipher !== ref_v[767:0]) begin failures++; $display("FAIL ciphertext mismatch"); end
    for (int k = 0; k < 20; k++) begin
      int b;
      b = int'($urandom_range(95, 0));
      ref_v[8*b +: 8] = 8'($urandom);
      wr(b, ref_v[8*b +: 8]);
      repeat (3) @(posedge crypt_clk);
      checks++;
      if (cipher !== ref_v[767:0]) begin failures++; $display("FAIL after rewrite of byte %0d", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
