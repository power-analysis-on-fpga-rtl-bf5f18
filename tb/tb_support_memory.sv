// tb_support_memory: writes 3488 random 12-bit points as byte pairs (low byte
// at even, high nibble at odd addresses), then reads random rows and checks
// p_out one read-clock cycle after p_rd_en, and that p_out holds while
// p_rd_en is low.
module tb_support_memory;
  logic usb_clk = 0, crypt_clk = 0, we = 0, p_rd_en = 0;
  logic [12:0] addr;
  logic [7:0] wdata;
  logic [11:0] p_rd_addr, p_out, held;
  logic [11:0] pts [3488];
  int checks = 0, failures = 0;

  always #5 usb_clk = ~usb_clk;
  always #7 crypt_clk = ~crypt_clk;

  support_memory dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3488; i++) begin
      pts[i] = 12'($urandom);
      @(negedge usb_clk); we = 1; addr = 13'(2*i);     wdata = pts[i][7:0];
      @(negedge usb_clk); we = 1; addr = 13'(2*i + 1); wdata = {4'($urandom), pts[i][11:8]};
    end
    @(negedge usb_clk); we = 0;
    for (int k = 0; k < 300; k++) begin
      int i;
      i = int'($urandom_range(3487, 0));
      @(negedge crypt_clk); p_rd_en = 1; p_rd_addr = 12'(i);
      @(negedge crypt_clk); p_rd_en = 0; p_rd_addr = 12'($urandom);
      checks++;
      if (p_out !== pts[i]) begin failures++; $display("FAIL row %0d: %h vs %h", i, p_out, pts[i]); end
      held = p_out;
      @(negedge crypt_clk);
      checks++;
      if (p_out !== held) begin failures++; $display("FAIL p_out changed without p_rd_en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
