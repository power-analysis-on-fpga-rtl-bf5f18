// ciphertext_memory: holds the 768-bit ciphertext and presents all of it to
// the decryption core at once.
//
// Three dual-port RAMs side by side, organised like the Goppa polynomial
// memory: a USB byte write at addr[6:0] goes to RAM addr[6:5] (0..2), byte
// addr[4:0]; RAM r supplies cipher[256*r +: 256] from its row 0, read on every
// decryption-clock cycle. Writes with addr[6:5] = 3 are ignored. This
// organisation follows the design.
module ciphertext_memory #(
  parameter int unsigned WIDTH = 768
) (
  input  logic             usb_clk,
  input  logic             we,
  input  logic [6:0]       addr,
  input  logic [7:0]       wdata,
  input  logic             crypt_clk,
  output logic [WIDTH-1:0] cipher
);

  for (genvar r = 0; r < 3; r++) begin : g_ram
    dual_port_ram #(.WAW(6), .RD_BYTES(32)) u_ram (
      .wclk(usb_clk), .we(we && addr[6:5] == 2'(r)), .waddr({1'b0, addr[4:0]}),
      .wdata, .rclk(crypt_clk), .ren(1'b1), .raddr(1'b0),
      .rdata(cipher[256*r +: 256]));
  end

endmodule
