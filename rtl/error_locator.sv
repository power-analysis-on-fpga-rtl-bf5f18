// error_locator: recovers the plaintext (error vector) bit by bit from the
// evaluated error locator polynomial.
//
// How it works. For every support index i = 0..n-1 in turn, support point
// P_OUT = alpha_i is read; its upper 7 bits address a 384-bit row of 32
// evaluations in the FFT memory. The row is registered, then five register
// stages halve it using P_OUT[4], P_OUT[3], P_OUT[2], P_OUT[1] and P_OUT[0]
// (a set bit keeps the upper half) until one 12-bit evaluation remains. If it
// is zero the point is a root of the locator and the plaintext bit is 1. The
// bit enters a shift register at the least significant position, so the bit
// of support index 0 ends at the most significant position:
//     error_recovered[n-1-i] = e_i.
// This datapath (row read, 384->192->96->48->24->12 halving registers, zero
// test, shift register) follows the design. One new index enters per cycle;
// the support read, FFT read and six register stages make a 9-cycle pipeline.
//
// Interface and timing: pulse start; the module drives the support memory
// port (p_out one cycle after p_rd_en) and the FFT-memory read port (data one
// cycle after fft_rd_en). done is seen n + 10 cycles after the start edge:
// 3498 cycles at n = 3488. error_recovered is held until the next start.
module error_locator
  import mce_pkg::*;
#(
  parameter int unsigned N     = 3488,
  parameter int unsigned LANES = 32
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          start,
  output logic                          p_rd_en,
  output logic [GF_M-1:0]               p_rd_addr,
  input  logic [GF_M-1:0]               p_out,
  output logic                          fft_rd_en,
  output logic [GF_M-$clog2(LANES)-1:0] fft_rd_row,
  input  logic [LANES*GF_M-1:0]         fft_rd_data,
  output logic [N-1:0]                  error_recovered,
  output logic                          busy,
  output logic                          done
);

  localparam int unsigned LW = $clog2(LANES);   // 5 halving stages
  localparam int unsigned RW = LANES * GF_M;    // 384

  logic                 issuing;
  logic [GF_M-1:0]      idx;
  logic                 v_p;                    // p_out valid
  logic                 v_f;                    // fft_rd_data valid
  logic [LW-1:0]        sel_f;                  // P_OUT[4:0] travelling with the row
  logic                 v_r;                    // row register valid
  logic [RW-1:0]        row_q;
  logic [LW-1:0]        sel_r;
  logic [LW-1:0]        v_h;                    // halving stage valid bits
  logic [LW-1:0]        sel_h [LW];
  logic [RW/2-1:0]      h1;
  logic [RW/4-1:0]      h2;
  logic [RW/8-1:0]      h3;
  logic [RW/16-1:0]     h4;
  logic [GF_M-1:0]      h5;
  logic                 tail;                   // last bit entered: raise done next

  assign p_rd_en    = issuing;
  assign p_rd_addr  = idx;
  assign fft_rd_en  = v_p;
  assign fft_rd_row = p_out[GF_M-1:LW];

  always_ff @(posedge clk) begin
    if (rst) begin
      issuing <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
      v_p     <= 1'b0;
      v_f     <= 1'b0;
      v_r     <= 1'b0;
      v_h     <= '0;
      tail    <= 1'b0;
      idx     <= '0;
      error_recovered <= '0;
    end else begin
      done <= tail;
      tail <= 1'b0;
      if (start && !busy) begin
        issuing <= 1'b1;
        busy    <= 1'b1;
        idx     <= '0;
      end else if (issuing) begin
        idx <= idx + 1'b1;
        if (idx == GF_M'(N-1)) issuing <= 1'b0;
      end
      // support read -> FFT row read
      v_p   <= issuing;
      v_f   <= v_p;
      sel_f <= p_out[LW-1:0];
      // row register
      v_r   <= v_f;
      row_q <= fft_rd_data;
      sel_r <= sel_f;
      // halving stages, P_OUT[4] first
      v_h[0]   <= v_r;
      h1       <= sel_r[4] ? row_q[RW-1:RW/2] : row_q[RW/2-1:0];
      sel_h[0] <= sel_r;
      v_h[1]   <= v_h[0];
      h2       <= sel_h[0][3] ? h1[RW/2-1:RW/4] : h1[RW/4-1:0];
      sel_h[1] <= sel_h[0];
      v_h[2]   <= v_h[1];
      h3       <= sel_h[1][2] ? h2[RW/4-1:RW/8] : h2[RW/8-1:0];
      sel_h[2] <= sel_h[1];
      v_h[3]   <= v_h[2];
      h4       <= sel_h[2][1] ? h3[RW/8-1:RW/16] : h3[RW/16-1:0];
      sel_h[3] <= sel_h[2];
      v_h[4]   <= v_h[3];
      h5       <= sel_h[3][0] ? h4[RW/16-1:RW/32] : h4[RW/32-1:0];
      // zero test and shift register
      if (v_h[4]) begin
        error_recovered <= {error_recovered[N-2:0], (h5 == '0)};
        if (!v_h[3]) begin
          tail <= 1'b1;
          busy <= 1'b0;
        end
      end
    end
  end

endmodule
