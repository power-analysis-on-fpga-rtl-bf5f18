// fft_memory: the table of polynomial evaluations used by the decryption core.
//
// 128 rows of 32 field elements (384 bits per row), one write port and one
// synchronous read port on the same clock. The row organisation (a 7-bit row
// address taken from the upper support bits, 384-bit row output) follows the
// plaintext-recovery datapath of the design; the single read port shared by
// the syndrome and locator steps is this implementation's choice.
//
// Timing: a write with wr_en lands at the clock edge; rd_data holds the row
// addressed in the previous cycle when rd_en was high (one-cycle latency).
module fft_memory #(
  parameter int unsigned ROWS  = 128,
  parameter int unsigned WIDTH = 384,
  parameter int unsigned AW    = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_row,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_row,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
    if (rd_en) rd_data <= mem[rd_row];
  end

endmodule
