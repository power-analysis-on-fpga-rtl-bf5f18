// poly_evaluator: evaluates a polynomial over GF(2^12) at all 4096 field
// elements and writes the results, 32 per row, into the FFT memory.
//
// Role: this is the "Additive FFT" unit of the decryption core. It runs twice
// per decryption: on the secret Goppa polynomial g(x) (step 1) and on the error
// locator polynomial (step 4). Only what the unit computes is fixed by the
// design (every evaluation, into a table of 32-element rows); how it computes
// it is this implementation's own choice: LANES*GROUP Horner evaluators run in
// parallel, one per element of GROUP consecutive rows, instead of an additive
// FFT. GROUP = 8 brings a whole evaluation close to the 1095 cycles of the
// original additive FFT.
//
// Element index k (0..4095) is the support integer; its value is the
// evaluation at field element support_to_gf(k). Row r holds k = 32r .. 32r+31,
// element k%32 in bits [12*(k%32) +: 12].
//
// Operation: a group of GROUP rows takes DEG+1 cycles (load the leading
// coefficient, then DEG Horner steps acc <- acc*x + c_i). Its results are
// latched into an output buffer and written one row per cycle while the next
// group is computed, so the memory write port never stalls the evaluators.
//
// Interface: pulse start for one cycle with coeffs stable (coefficient i of x^i
// in bits [12*i +: 12]; coeffs must stay stable until done). done pulses one
// cycle after the last row is written. Latency from start to done:
// (ROWS/GROUP)*(DEG+1) + GROUP + 2 cycles, 1050 at the defaults.
module poly_evaluator
  import mce_pkg::*;
#(
  parameter int unsigned DEG   = 64,               // polynomial degree (t)
  parameter int unsigned LANES = 32,               // elements per FFT-memory row
  parameter int unsigned GROUP = 8,                // rows evaluated together
  parameter int unsigned ROWS  = GF_Q / LANES,
  parameter int unsigned RW    = $clog2(ROWS)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic [(DEG+1)*GF_M-1:0]   coeffs,
  output logic                      wr_en,
  output logic [RW-1:0]             wr_row,
  output logic [LANES*GF_M-1:0]     wr_data,
  output logic                      busy,
  output logic                      done
);

  localparam int unsigned PAR    = LANES * GROUP;       // evaluators
  localparam int unsigned GROUPS = ROWS / GROUP;
  localparam int unsigned GW     = (GROUPS > 1) ? $clog2(GROUPS) : 1;
  localparam int unsigned SW     = (GROUP > 1) ? $clog2(GROUP) : 1;
  localparam int unsigned IW     = $clog2(DEG+1);

  logic             computing;                  // a group is being evaluated
  logic [GW-1:0]    grp;                        // group being evaluated
  logic [IW-1:0]    idx;                        // coefficient folded in, DEG down to 0
  gf_t              acc  [PAR];
  gf_t              accn [PAR];
  gf_t              c_i;
  gf_t              obuf [PAR];                 // results of the last finished group
  logic             writing;                    // obuf is being written out
  logic [RW-1:0]    wbase;                      // first row of obuf
  logic [SW-1:0]    wsub;                       // row of obuf written next
  logic             last_group;                 // obuf holds the final group
  logic             fin;                        // final row written

  assign c_i = coeffs[idx*GF_M +: GF_M];

  // Horner step for every evaluator: acc <- acc * x + c_i (acc starts at c_DEG).
  for (genvar l = 0; l < PAR; l++) begin : g_lane
    gf_t x;                                     // point of this evaluator
    assign x = support_to_gf(gf_t'(int'(grp) * PAR + l));
    always_comb
      if (idx == IW'(DEG)) accn[l] = c_i;
      else                 accn[l] = gf_mul(acc[l], x) ^ c_i;
  end

  assign busy = computing || writing;

  always_ff @(posedge clk) begin
    if (rst) begin
      computing  <= 1'b0;
      writing    <= 1'b0;
      done       <= 1'b0;
      wr_en      <= 1'b0;
      wr_row     <= '0;
      wr_data    <= '0;
      grp        <= '0;
      idx        <= IW'(DEG);
      wbase      <= '0;
      wsub       <= '0;
      last_group <= 1'b0;
      fin        <= 1'b0;
    end else begin
      done  <= fin;
      fin   <= 1'b0;
      wr_en <= 1'b0;
      // evaluation of one group
      if (start && !busy) begin
        computing <= 1'b1;
        grp       <= '0;
        idx       <= IW'(DEG);
      end else if (computing) begin
        for (int l = 0; l < PAR; l++) acc[l] <= accn[l];
        if (idx == 0) begin
          for (int l = 0; l < PAR; l++) obuf[l] <= accn[l];
          writing    <= 1'b1;
          wbase      <= RW'(int'(grp) * GROUP);
          wsub       <= '0;
          last_group <= (grp == GW'(GROUPS-1));
          idx        <= IW'(DEG);
          if (grp == GW'(GROUPS-1)) computing <= 1'b0;
          grp        <= grp + 1'b1;
        end else begin
          idx <= idx - 1'b1;
        end
      end
      // write-out of the previous group, one row per cycle
      if (writing && !(computing && idx == 0)) begin
        wr_en  <= 1'b1;
        wr_row <= wbase + RW'(wsub);
        for (int l = 0; l < LANES; l++)
          wr_data[l*GF_M +: GF_M] <= obuf[int'(wsub) * LANES + l];
        wsub <= wsub + 1'b1;
        if (wsub == SW'(GROUP-1)) begin
          writing <= 1'b0;
          fin     <= last_group;
        end
      end
    end
  end

endmodule
