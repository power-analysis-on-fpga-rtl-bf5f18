// mce_top: Classic McEliece decryption on the CW305 side-channel target board.
//
// Three parts, as in the design: the USB interface (byte-wide register bus
// from the board's USB transceiver), the decryption register (register map,
// start/busy hand-shake, clock-domain crossing, capture trigger) and the
// decryption module (input memories, decryption core, output multiplexer).
// The host writes the secret support (register 0x0C), the Goppa polynomial
// (0x0D) and the ciphertext (0x0E), writes 1 to REG_CRYPT_GO (0x05), polls
// bit 0 of that register until the decryption is no longer busy and reads the
// plaintext from register 0x0F. trigger goes to the capture equipment: high
// during the whole decryption, or only during the last step when bit 1 of
// REG_CRYPT_GO was set with the start.
//
// Clocks: usb_clk for the bus side, crypt_clk for the decryption (the design
// runs it at 5 MHz). rst is a synchronous reset held for a few cycles of both
// clocks.
module mce_top
  import mce_pkg::*;
#(
  parameter int unsigned N = 3488,
  parameter int unsigned T = 64
) (
  input  logic        usb_clk,
  input  logic        crypt_clk,
  input  logic        rst,
  input  logic [20:0] usb_addr,
  input  logic [7:0]  usb_data_in,
  output logic [7:0]  usb_data_out,
  output logic        usb_data_oe,
  input  logic        usb_rdn,
  input  logic        usb_wrn,
  input  logic        usb_cen,
  output logic [7:0]  user_led,
  output logic [7:0]  clk_settings,
  output logic        trigger
);

  logic [7:0]  reg_addr, reg_wdata, reg_rdata, mem_wdata, rd_data;
  logic [12:0] reg_offset, mem_addr, rd_addr;
  logic        reg_write, reg_read;
  logic        we_support, we_poly, we_cipher;
  logic        start, busy, done;
  step_t       step;

  usb_interface u_usb (
    .usb_clk, .rst, .usb_addr, .usb_data_in, .usb_data_out, .usb_data_oe,
    .usb_rdn, .usb_wrn, .usb_cen,
    .reg_addr, .reg_offset, .reg_wdata, .reg_write, .reg_read, .reg_rdata);

  decryption_register u_reg (
    .usb_clk, .rst, .reg_addr, .reg_offset, .reg_wdata, .reg_write, .reg_rdata,
    .we_support, .we_poly, .we_cipher, .mem_addr, .mem_wdata,
    .rd_addr, .rd_data, .clk_settings, .user_led,
    .crypt_clk, .start, .busy, .step, .trigger);

  decryption_module #(.N(N), .T(T)) u_dec (
    .usb_clk, .we_support, .we_poly, .we_cipher, .waddr(mem_addr),
    .wdata(mem_wdata), .rd_addr, .rd_data,
    .crypt_clk, .rst, .start, .busy, .done, .step);

endmodule
