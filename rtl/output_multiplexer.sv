// output_multiplexer: reads the recovered plaintext a byte at a time.
//
// A combinational n-to-8 multiplexer: byte k of the USB register REG_REC_ERR_OUT
// (k = bank*32 + byte) is error_recovered[8k+7:8k]; the last byte is padded
// with zeros when n is not a multiple of 8 (it is not for n = 3488: 436 full
// bytes). The multiplexer itself is the design's; the byte order is this
// implementation's choice.
module output_multiplexer #(
  parameter int unsigned N  = 3488,
  parameter int unsigned NB = (N + 7) / 8
) (
  input  logic [N-1:0]  error_recovered,
  input  logic [12:0]   byte_addr,
  output logic [7:0]    data
);

  logic [8*NB-1:0] padded;

  assign padded = (8*NB)'(error_recovered);
  assign data   = (int'(byte_addr) < NB) ? padded[byte_addr*8 +: 8] : 8'h00;

endmodule
