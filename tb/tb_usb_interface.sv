// tb_usb_interface: drives random bus writes and reads and checks the decoded
// register number (address bits 20:13), offset (bits 12:0), write data and
// the one-cycle reg_write / reg_read pulses, and that read data from the
// register side appears on usb_data_out with usb_data_oe two cycles after the
// read cycle. Idle cycles must produce no pulses.
module tb_usb_interface;
  logic usb_clk = 0, rst = 1;
  logic [20:0] usb_addr;
  logic [7:0] usb_data_in, usb_data_out, reg_addr, reg_wdata, reg_rdata;
  logic usb_data_oe, usb_rdn = 1, usb_wrn = 1, usb_cen = 1;
  logic [12:0] reg_offset;
  logic reg_write, reg_read;
  int checks = 0, failures = 0;

  always #5 usb_clk = ~usb_clk;

  usb_interface dut (.*);

  // register side model: returns a function of the address
  assign reg_rdata = reg_addr ^ reg_offset[7:0] ^ {3'b0, reg_offset[12:8]};

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [20:0] a;
    logic [7:0] d;
    repeat (3) @(negedge usb_clk);
    rst = 0;
    for (int k = 0; k < 200; k++) begin
      a = 21'($urandom);
      d = 8'($urandom);
      if (k % 2 == 0) begin
        @(negedge usb_clk); usb_cen = 0; usb_wrn = 0; usb_addr = a; usb_data_in = d;
        @(negedge usb_clk); usb_cen = 1; usb_wrn = 1; usb_addr = 21'($urandom);
        chk(reg_write && !reg_read, "write pulse");
        chk(reg_addr == a[20:13] && reg_offset == a[12:0] && reg_wdata == d, "write decode");
        @(negedge usb_clk);
        chk(!reg_write && !reg_read, "single-cycle write pulse");
      end else begin
        @(negedge usb_clk); usb_cen = 0; usb_rdn = 0; usb_addr = a;
        @(negedge usb_clk); usb_cen = 1; usb_rdn = 1; usb_addr = 21'($urandom);
        chk(reg_read && !reg_write, "read pulse");
        chk(reg_addr == a[20:13] && reg_offset == a[12:0], "read decode");
        @(negedge usb_clk);
        chk(usb_data_oe, "output enable");
        chk(usb_data_out == (a[20:13] ^ a[7:0] ^ {3'b0, a[12:8]}), "read data");
        @(negedge usb_clk);
        chk(!usb_data_oe && !reg_read, "read ends");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
