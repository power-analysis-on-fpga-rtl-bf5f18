// poly_g_memory: holds the secret Goppa polynomial g(x), 780 bits, and
// presents all of it to the decryption core at once.
//
// Four dual-port RAMs are placed side by side. On the USB side a byte write at
// address addr[6:0] goes to RAM addr[6:5] (0..3), byte addr[4:0] of its
// 256-bit row 0: bytes 0..31 form bits 255:0 of poly_g, bytes 32..63 bits
// 511:256, bytes 64..95 bits 767:512 and bytes 96..97 bits 779:768 (only the
// low 12 bits of the fourth RAM are used). On the decryption side every RAM
// reads its row 0 on every clock, so poly_g follows the written contents one
// decryption-clock cycle later. The organisation (four RAMs, 8-bit port 1
// with address {0, addr[4:0]}, 256-bit port 2 fixed at row 0) follows the
// design.
module poly_g_memory #(
  parameter int unsigned WIDTH = 780
) (
  input  logic             usb_clk,
  input  logic             we,
  input  logic [6:0]       addr,
  input  logic [7:0]       wdata,
  input  logic             crypt_clk,
  output logic [WIDTH-1:0] poly_g
);

  logic [1023:0] rd;

  for (genvar r = 0; r < 4; r++) begin : g_ram
    dual_port_ram #(.WAW(6), .RD_BYTES(32)) u_ram (
      .wclk(usb_clk), .we(we && addr[6:5] == 2'(r)), .waddr({1'b0, addr[4:0]}),
      .wdata, .rclk(crypt_clk), .ren(1'b1), .raddr(1'b0),
      .rdata(rd[256*r +: 256]));
  end

  assign poly_g = rd[WIDTH-1:0];

endmodule
