// support_memory: holds the secret support, n points of 12 bits, one point
// per row, read by the decryption core one point per cycle.
//
// Two dual-port RAMs of 4096 x 8 bits. Each point takes two bytes on the USB
// side: a write at addr[12:0] goes to row addr[12:1]; addr[0] = 0 writes the
// low RAM (point bits 7:0), addr[0] = 1 the high RAM (bits 11:8 from wdata[3:0]).
// On the decryption side P_rd_addr reads both RAMs and p_out = {high[3:0],
// low[7:0]} appears one cycle after P_rd_en. This organisation follows the
// design.
module support_memory (
  input  logic        usb_clk,
  input  logic        we,
  input  logic [12:0] addr,
  input  logic [7:0]  wdata,
  input  logic        crypt_clk,
  input  logic        p_rd_en,
  input  logic [11:0] p_rd_addr,
  output logic [11:0] p_out
);

  logic [7:0] lo, hi;

  dual_port_ram #(.WAW(12), .RD_BYTES(1)) u_lo (
    .wclk(usb_clk), .we(we && !addr[0]), .waddr(addr[12:1]), .wdata,
    .rclk(crypt_clk), .ren(p_rd_en), .raddr(p_rd_addr), .rdata(lo));

  dual_port_ram #(.WAW(12), .RD_BYTES(1)) u_hi (
    .wclk(usb_clk), .we(we && addr[0]), .waddr(addr[12:1]), .wdata,
    .rclk(crypt_clk), .ren(p_rd_en), .raddr(p_rd_addr), .rdata(hi));

  assign p_out = {hi[3:0], lo};

endmodule
