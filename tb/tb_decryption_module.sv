// tb_decryption_module: loads a random key and ciphertext into the three
// input memories through the byte write port (support as low/high byte pairs,
// polynomial and ciphertext as bytes, least significant first), starts a
// decryption, waits for busy to fall and reads all 436 plaintext bytes
// through the output multiplexer, checking them against the error vector.
// Full size (n = 3488, t = 64).
module tb_decryption_module;
  import mce_pkg::*;
  import tb_mce_pkg::*;

  localparam int N = 3488, T = 64, MT = 768;
  logic usb_clk = 0, crypt_clk = 0, rst = 1, start = 0;
  logic we_support = 0, we_poly = 0, we_cipher = 0;
  logic [12:0] waddr, rd_addr;
  logic [7:0] wdata, rd_data;
  logic busy, done;
  step_t step;
  int checks = 0, failures = 0;

  always #5 usb_clk = ~usb_clk;
  always #7 crypt_clk = ~crypt_clk;

  decryption_module dut (.*);

  initial begin
    #(14 * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wbyte(int which, int a, logic [7:0] d);
    @(negedge usb_clk);
    we_support = (which == 0); we_poly = (which == 1); we_cipher = (which == 2);
    waddr = 13'(a); wdata = d;
    @(negedge usb_clk);
    we_support = 0; we_poly = 0; we_cipher = 0;
  endtask

  initial begin
    mce_case mc;
    int forced[$];
    logic [783:0] pv;
    logic [767:0] cv;
    int bad, dones;
    void'($urandom(5));
    mc = new(N, T);
    do void'(mc.make_key(0)); while (!mc.encrypt(forced));
    repeat (3) @(negedge crypt_clk);
    rst = 0;
    for (int i = 0; i < N; i++) begin
      wbyte(0, 2*i, mc.support[i][7:0]);
      wbyte(0, 2*i + 1, {4'h0, mc.support[i][11:8]});
    end
    pv = '0;
    for (int i = 0; i <= T; i++) pv[12*i +: 12] = mc.g[i];
    for (int b = 0; b < 98; b++) wbyte(1, b, pv[8*b +: 8]);
    for (int k = 0; k < MT; k++) cv[k] = mc.c[k];
    for (int b = 0; b < 96; b++) wbyte(2, b, cv[8*b +: 8]);
    repeat (2) @(negedge crypt_clk);
    start = 1;
    @(negedge crypt_clk) start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy not raised"); end
    dones = 0;
    while (busy) begin @(negedge crypt_clk); dones += int'(done); end
    checks++;
    if (dones != 1) begin failures++; $display("FAIL %0d done pulses", dones); end
    bad = 0;
    for (int k = 0; k < 436; k++) begin
      logic [7:0] e8;
      rd_addr = 13'(k);
      #1;
      for (int b = 0; b < 8; b++) e8[b] = mc.e[N - 1 - (8*k + b)];
      if (rd_data !== e8) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d plaintext bytes wrong", bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
