// decryption_module: the decryption core together with the memories that feed
// it and the multiplexer that reads its result.
//
// The secret Goppa polynomial, the secret support and the ciphertext are
// written byte by byte from the USB clock domain into dual-port RAMs whose
// second ports run on the decryption clock and feed the core (poly_g and the
// ciphertext as full-width vectors, the support through the core's read
// port). The recovered plaintext is read through an n-to-8 multiplexer.
// This structure follows the design.
//
// Interface: we_support/we_poly/we_cipher with waddr (byte address within the
// register: bank*32 + byte) and wdata write the memories on usb_clk. start
// (decryption clock, one cycle) begins a decryption; busy is high from the
// cycle after start until done; step tells which of the five steps runs.
// rd_addr selects the plaintext byte on rd_data (combinational). The inputs
// must not be written while busy is high.
module decryption_module
  import mce_pkg::*;
#(
  parameter int unsigned N = 3488,
  parameter int unsigned T = 64
) (
  input  logic          usb_clk,
  input  logic          we_support,
  input  logic          we_poly,
  input  logic          we_cipher,
  input  logic [12:0]   waddr,
  input  logic [7:0]    wdata,
  input  logic [12:0]   rd_addr,
  output logic [7:0]    rd_data,
  input  logic          crypt_clk,
  input  logic          rst,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output step_t         step
);

  logic [(T+1)*GF_M-1:0] poly_g;
  logic [GF_M*T-1:0]     cipher;
  logic                  p_rd_en;
  logic [GF_M-1:0]       p_rd_addr, p_out;
  logic [N-1:0]          error_recovered;

  poly_g_memory #(.WIDTH((T+1)*GF_M)) u_poly_mem (
    .usb_clk, .we(we_poly), .addr(waddr[6:0]), .wdata,
    .crypt_clk, .poly_g);

  ciphertext_memory #(.WIDTH(GF_M*T)) u_cipher_mem (
    .usb_clk, .we(we_cipher), .addr(waddr[6:0]), .wdata,
    .crypt_clk, .cipher);

  support_memory u_support_mem (
    .usb_clk, .we(we_support), .addr(waddr), .wdata,
    .crypt_clk, .p_rd_en, .p_rd_addr, .p_out);

  decryption_core #(.N(N), .T(T)) u_core (
    .clk(crypt_clk), .rst, .start, .poly_g, .ciphertext(cipher),
    .P_rd_en(p_rd_en), .P_rd_addr(p_rd_addr), .P_out(p_out),
    .done, .error_recovered, .step);

  output_multiplexer #(.N(N)) u_out_mux (
    .error_recovered, .byte_addr(rd_addr), .data(rd_data));

  assign busy = (step != STEP_IDLE);

endmodule
