// tb_mce_top: end-to-end test of the whole FPGA design at its full size
// through the USB register bus, as the capture host uses it.
//
// For two random keys and ciphertexts it writes the support (REG_P_MATRIX_IN,
// 218 banks of 32 bytes), the Goppa polynomial (REG_POLY_G_IN) and the
// ciphertext (REG_CIPHER_IN), starts the decryption through REG_CRYPT_GO,
// polls the busy bit, reads the 436 plaintext bytes from REG_REC_ERR_OUT and
// compares them with the error vector. The first run uses trigger mode 0
// (trigger for the whole decryption), the second mode 1 (trigger only while
// the plaintext is recovered: the 3498-cycle recovery step plus the
// sequencer hand-over cycle, 3499 decryption cycles).
//
// Mechanisms counted, each must occur: busy seen while polling; trigger for
// the whole decryption; trigger for the last step only; a double-syndrome
// scan stalled on a full block buffer; a partial last syndrome block; an
// error at the support point 0.
module tb_mce_top;
  import tb_mce_pkg::*;

  localparam int N = 3488, T = 64, MT = 768;
  logic usb_clk = 0, crypt_clk = 0, rst = 1;
  logic [20:0] usb_addr = '0;
  logic [7:0] usb_data_in = '0, usb_data_out, user_led, clk_settings;
  logic usb_data_oe, usb_rdn = 1, usb_wrn = 1, usb_cen = 1, trigger;
  int checks = 0, failures = 0;
  int n_busy = 0, n_trig_full = 0, n_trig_last = 0, n_stall = 0, n_partial = 0, n_zero_err = 0;

  always #5 usb_clk = ~usb_clk;
  always #7 crypt_clk = ~crypt_clk;

  mce_top dut (.*);

  // block-buffer stall: a full buffer waiting for the accumulation engine
  always @(posedge crypt_clk)
    if (dut.u_dec.u_core.u_synd.count == 20 && dut.u_dec.u_core.u_synd.eng != 0) n_stall++;

  initial begin
    #(14 * 800000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [20:0] bus_addr(int r, int off);
    return 21'((r << 13) | off);
  endfunction

  task automatic bus_write(int r, int off, logic [7:0] d);
    @(negedge usb_clk); usb_cen = 0; usb_wrn = 0; usb_addr = bus_addr(r, off); usb_data_in = d;
    @(negedge usb_clk); usb_cen = 1; usb_wrn = 1;
  endtask

  task automatic bus_read(int r, int off, output logic [7:0] d);
    @(negedge usb_clk); usb_cen = 0; usb_rdn = 0; usb_addr = bus_addr(r, off);
    @(negedge usb_clk); usb_cen = 1; usb_rdn = 1;
    @(negedge usb_clk);
    d = usb_data_out;
    if (!usb_data_oe) d = 8'hxx;
  endtask

  task automatic run(mce_case mc, int mode);
    logic [783:0] pv;
    logic [767:0] cv;
    logic [7:0] d;
    int bad, trig, ones, lo;
    // support: two bytes per point
    for (int i = 0; i < N; i++) begin
      bus_write(12, 2*i, mc.support[i][7:0]);
      bus_write(12, 2*i + 1, {4'h0, mc.support[i][11:8]});
    end
    pv = '0;
    for (int i = 0; i <= T; i++) pv[12*i +: 12] = mc.g[i];
    for (int b = 0; b < 98; b++) bus_write(13, b, pv[8*b +: 8]);
    ones = 0;
    for (int k = 0; k < MT; k++) begin cv[k] = mc.c[k]; ones += int'(mc.c[k]); end
    for (int b = 0; b < 96; b++) bus_write(14, b, cv[8*b +: 8]);
    if (ones % 20 != 0) n_partial++;
    for (int k = 0; k < T; k++) if (mc.support[mc.err_pos[k]] == 0) n_zero_err++;
    repeat (4) @(negedge usb_clk);
    trig = 0;
    fork
      begin : count_trigger
        forever @(posedge crypt_clk) trig += int'(trigger);
      end
      begin
        bus_write(5, 0, 8'(1 + 2 * mode));
        repeat (20) @(negedge usb_clk);
        do begin
          bus_read(5, 0, d);
          if (d[0]) n_busy++;
          repeat (50) @(negedge usb_clk);
        end while (d[0]);
      end
    join_any
    disable fork;
    // mode 0: both evaluations, BM, plaintext recovery and the syndrome's
    // 130 cycles per block of 20 ones, plus its scan to the first full block
    lo = 2 * (1050 + 1) + (1921 + 1) + (3498 + 1) + 130 * ((ones + 19) / 20);
    if (mode == 0 && trig >= lo && trig <= lo + 800) n_trig_full++;
    if (mode == 1 && trig == 3499) n_trig_last++;
    chk(mode == 0 ? (trig >= lo && trig <= lo + 800) : trig == 3499,
        $sformatf("trigger high %0d cycles in mode %0d", trig, mode));
    bad = 0;
    for (int k = 0; k < 436; k++) begin
      logic [7:0] e8;
      bus_read(15, k, d);
      for (int b = 0; b < 8; b++) e8[b] = mc.e[N - 1 - (8*k + b)];
      if (d !== e8) bad++;
    end
    chk(bad == 0, $sformatf("%0d plaintext bytes wrong", bad));
    $display("run in mode %0d: %0d ones in ciphertext, trigger %0d cycles, %0d bytes wrong", mode, ones, trig, bad);
  endtask

  initial begin
    mce_case mc;
    int forced[$];
    logic [7:0] d;
    void'($urandom(23));
    mc = new(N, T);
    repeat (4) @(negedge crypt_clk);
    rst = 0;
    bus_write(1, 0, 8'h5A);
    bus_read(1, 0, d);
    chk(d == 8'h5A && user_led == 8'h5A, "USER_LED register");
    do void'(mc.make_key(0)); while (!mc.encrypt(forced));
    run(mc, 0);
    forced = '{1};          // support index 1 holds the point 0
    do void'(mc.make_key(1)); while (!mc.encrypt(forced));
    run(mc, 1);
    chk(n_busy > 0, "busy seen while polling");
    chk(n_trig_full > 0, "whole-decryption trigger");
    chk(n_trig_last > 0, "last-step trigger");
    chk(n_stall > 0, "syndrome scan stalled on a full block");
    chk(n_partial > 0, "partial last syndrome block");
    chk(n_zero_err > 0, "error at support point 0");
    $display("mechanisms: busy=%0d trig_full=%0d trig_last=%0d stall=%0d partial=%0d zero_err=%0d",
             n_busy, n_trig_full, n_trig_last, n_stall, n_partial, n_zero_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
