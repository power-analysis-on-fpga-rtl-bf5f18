// dual_port_ram: block RAM with a byte-wide write port and a wide read port on
// separate clocks, the memory primitive of the input memories.
//
// Port 1 (wclk) writes one byte at byte address waddr. Port 2 (rclk) reads
// RD_BYTES consecutive bytes as one row: row r is bytes r*RD_BYTES ..
// r*RD_BYTES+RD_BYTES-1, the lowest address in the least significant byte.
// rdata is registered: it shows the row addressed in the previous rclk cycle
// in which ren was high. The mixed port widths follow the memories of the
// design (8-bit write, 256-bit, 8-bit read).
module dual_port_ram #(
  parameter int unsigned WAW      = 6,              // byte address width
  parameter int unsigned RD_BYTES = 32,             // bytes per read row
  parameter int unsigned RAW      = (WAW > $clog2(RD_BYTES)) ? WAW - $clog2(RD_BYTES) : 1
) (
  input  logic                  wclk,
  input  logic                  we,
  input  logic [WAW-1:0]        waddr,
  input  logic [7:0]            wdata,
  input  logic                  rclk,
  input  logic                  ren,
  input  logic [RAW-1:0]        raddr,
  output logic [8*RD_BYTES-1:0] rdata
);

  localparam int unsigned ROWS = (1 << WAW) / RD_BYTES;

  logic [8*RD_BYTES-1:0] mem [ROWS];

  always_ff @(posedge wclk)
    if (we) mem[int'(waddr) / RD_BYTES][8*(int'(waddr) % RD_BYTES) +: 8] <= wdata;

  always_ff @(posedge rclk)
    if (ren) rdata <= mem[raddr];

endmodule
