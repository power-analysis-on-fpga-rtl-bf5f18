// tb_decryption_register: checks the register map and the clock crossing.
// Memory register writes must raise exactly the matching write strobe with the
// offset and data; CLKSETTINGS and USER_LED read back; the constant registers
// and BUILDTIME bytes read their values; REC_ERR_OUT returns the multiplexer
// byte for the offset. A GO write must give exactly one start pulse in the
// decryption domain, busy must read back in the GO register, and the trigger
// must follow busy in mode 0 and the last step in mode 1.
module tb_decryption_register;
  import mce_pkg::*;
  logic usb_clk = 0, crypt_clk = 0, rst = 1;
  logic [7:0] reg_addr, reg_wdata, reg_rdata, mem_wdata, rd_data, clk_settings, user_led;
  logic [12:0] reg_offset, mem_addr, rd_addr;
  logic reg_write = 0;
  logic we_support, we_poly, we_cipher, start, busy, trigger;
  step_t step;
  int checks = 0, failures = 0, starts = 0;

  always #5 usb_clk = ~usb_clk;
  always #8 crypt_clk = ~crypt_clk;

  decryption_register #(.BUILDTIME(32'h1234_5678)) dut (.*);

  assign rd_data = rd_addr[7:0] ^ 8'h5A;

  // a small decryption model: busy for 40 cycles after start, last 10 in STEP_LOCATE
  int bcnt;
  always_ff @(posedge crypt_clk) begin
    if (rst) begin bcnt <= 0; end
    else if (start) begin bcnt <= 40; starts <= starts + 1; end
    else if (bcnt > 0) bcnt <= bcnt - 1;
  end
  assign busy = bcnt > 0;
  assign step = (bcnt == 0) ? STEP_IDLE : (bcnt <= 10) ? STEP_LOCATE : STEP_SYNDROME;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [7:0] r, logic [12:0] off, logic [7:0] d);
    @(negedge usb_clk); reg_addr = r; reg_offset = off; reg_wdata = d; reg_write = 1;
    #1;
    chk(we_support == (r == REG_P_MATRIX_IN) && we_poly == (r == REG_POLY_G_IN) &&
        we_cipher == (r == REG_CIPHER_IN), $sformatf("strobes for register %h", r));
    if (we_support || we_poly || we_cipher) chk(mem_addr == off && mem_wdata == d, "memory address/data");
    @(negedge usb_clk); reg_write = 0;
  endtask

  task automatic rd(logic [7:0] r, logic [12:0] off, output logic [7:0] d);
    reg_addr = r; reg_offset = off;
    #1 d = reg_rdata;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int trig_cycles, busy_seen;
    logic [7:0] d;
    repeat (4) @(negedge crypt_clk);
    rst = 0;
    for (int k = 0; k < 20; k++) wr(8'(12 + k % 3), 13'($urandom), 8'($urandom));
    wr(REG_CLKSETTINGS, 0, 8'hA5);
    wr(REG_USER_LED, 0, 8'h3C);
    #1;
    rd(REG_CLKSETTINGS, 0, d);  chk(d == 8'hA5 && clk_settings == 8'hA5, "CLKSETTINGS");
    rd(REG_USER_LED, 0, d);     chk(d == 8'h3C && user_led == 8'h3C, "USER_LED");
    rd(REG_BUILDTIME, 0, d);    chk(d == 8'h78, "BUILDTIME byte 0");
    rd(REG_BUILDTIME, 3, d);    chk(d == 8'h12, "BUILDTIME byte 3");
    rd(REG_IDENTIFY, 0, d);     chk(d == 8'h2E, "IDENTIFY");
    rd(REG_REC_ERR_OUT, 13'h123, d); chk(d == (8'h23 ^ 8'h5A), "REC_ERR_OUT");
    for (int mode = 0; mode < 2; mode++) begin
      int s0;
      s0 = starts;
      wr(REG_CRYPT_GO, 0, 8'(1 + 2 * mode));
      trig_cycles = 0; busy_seen = 0;
      repeat (80) begin
        @(negedge crypt_clk);
        trig_cycles += int'(trigger);
        rd(REG_CRYPT_GO, 0, d);
        busy_seen += int'(d == 8'(1 + 2 * mode));
      end
      chk(starts == s0 + 1, "exactly one start pulse");
      chk(busy_seen > 20, "busy visible in GO register");
      if (mode == 0) chk(trig_cycles >= 40 && trig_cycles <= 42, $sformatf("mode 0 trigger %0d cycles", trig_cycles));
      else           chk(trig_cycles == 10, $sformatf("mode 1 trigger %0d cycles", trig_cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
