// usb_interface: FPGA side of the CW305 USB bus. Turns byte reads and writes
// from the USB transceiver into register accesses.
//
// The 21-bit bus address is split into a register number reg_addr =
// usb_addr[20:13] (see the register map in mce_pkg), a bank usb_addr[12:5]
// and a byte within the bank usb_addr[4:0]; reg_offset = usb_addr[12:0] =
// bank*32 + byte. A register can therefore hold up to 2^13 = 8192 bytes, and
// the host writes the largest input, the 6976-byte support, in 218 transfers
// of one 32-byte bank. The 8-bit bank and 5-bit byte fields follow the design;
// placing the register number in the 8 bits above them fills the 21-bit bus.
//
// Bus timing (this implementation's choice): all bus inputs are sampled on
// usb_clk. A cycle with usb_cen = 0 and usb_wrn = 0 writes usb_data_in at
// usb_addr: reg_write pulses one cycle later with the registered address and
// data. A cycle with usb_cen = 0 and usb_rdn = 0 reads: reg_read pulses one
// cycle later and the byte from reg_rdata appears on usb_data_out, with
// usb_data_oe high, one cycle after that (two-cycle read latency).
module usb_interface (
  input  logic        usb_clk,
  input  logic        rst,
  input  logic [20:0] usb_addr,
  input  logic [7:0]  usb_data_in,
  output logic [7:0]  usb_data_out,
  output logic        usb_data_oe,
  input  logic        usb_rdn,
  input  logic        usb_wrn,
  input  logic        usb_cen,
  output logic [7:0]  reg_addr,
  output logic [12:0] reg_offset,
  output logic [7:0]  reg_wdata,
  output logic        reg_write,
  output logic        reg_read,
  input  logic [7:0]  reg_rdata
);

  always_ff @(posedge usb_clk) begin
    if (rst) begin
      reg_write    <= 1'b0;
      reg_read     <= 1'b0;
      usb_data_oe  <= 1'b0;
      usb_data_out <= '0;
      reg_addr     <= '0;
      reg_offset   <= '0;
      reg_wdata    <= '0;
    end else begin
      reg_write <= !usb_cen && !usb_wrn;
      reg_read  <= !usb_cen && !usb_rdn && usb_wrn;
      if (!usb_cen) begin
        reg_addr   <= usb_addr[20:13];
        reg_offset <= usb_addr[12:0];
      end
      if (!usb_cen && !usb_wrn) reg_wdata <= usb_data_in;
      usb_data_oe <= reg_read;
      if (reg_read) usb_data_out <= reg_rdata;
    end
  end

endmodule
