// double_syndrome: computes the double-size syndrome of the received word
// (c | 0) with respect to g(x)^2:
//     S_j = sum over i with c_i = 1 of  alpha_i^j / g(alpha_i)^2,  j = 0..2t-1,
// where alpha_i is support point i and g(alpha_i) is read from the FFT memory
// filled in step 1.
//
// How it works. The ciphertext is scanned one bit per cycle from the most
// significant bit (index mt-1) down to bit 0. A support point is read only for
// a bit that is 1, so the run time depends on the number of ones, as in the
// design this follows. Each such point passes a 3-cycle read pipeline (support
// memory, FFT-memory row, inversion of g(alpha)^2) into a buffer of BLOCK
// entries. A full buffer (or the last, partial one) is handed to the
// accumulation engine, which spends 2t+2 cycles on it: one load cycle, 2t
// cycles in which all BLOCK lanes multiply their running term by alpha and add
// into the syndrome at the head of a rotating 2t-entry register, and one
// release cycle. The scan continues into the emptied buffer while the engine
// works. With dense ciphertexts the run time is
//     C0 + ceil(ones / BLOCK) * (2t+2) + A
// where A is the number of bits scanned until BLOCK ones are found (from the
// MSB) and C0 = 4 in this implementation; the block structure, the 130-cycle
// block time at t = 64 and the formula's shape follow the design, the inner
// pipeline and the constant are this implementation's choices.
//
// Interface: pulse start with cipher stable; the module drives the support
// memory port (p_rd_en/p_rd_addr, p_out one cycle later) and the FFT-memory
// read port (fft_rd_en/fft_rd_row, fft_rd_data one cycle later). synd holds S_j
// in bits [12*j +: 12] and is valid when done pulses.
module double_syndrome
  import mce_pkg::*;
#(
  parameter int unsigned T     = 64,
  parameter int unsigned MT    = GF_M * T,         // ciphertext bits
  parameter int unsigned BLOCK = 20,
  parameter int unsigned LANES = 32                // elements per FFT row
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic [MT-1:0]             cipher,
  output logic                      p_rd_en,
  output logic [GF_M-1:0]           p_rd_addr,
  input  logic [GF_M-1:0]           p_out,
  output logic                      fft_rd_en,
  output logic [GF_M-$clog2(LANES)-1:0] fft_rd_row,
  input  logic [LANES*GF_M-1:0]     fft_rd_data,
  output logic [2*T*GF_M-1:0]       synd,
  output logic                      busy,
  output logic                      done
);

  localparam int unsigned LW = $clog2(LANES);
  localparam int unsigned CW = $clog2(BLOCK+1);
  localparam int unsigned JW = $clog2(2*T+1);

  // ---------------- scan and read pipeline ----------------
  logic                 scanning;
  logic [$clog2(MT)-1:0] k;                 // ciphertext bit under scan
  logic                 v1, v2;              // in-flight points (support read, FFT read)
  logic [LW-1:0]        sel2;                // element within the FFT row
  gf_t                  pt2;                 // support integer of the point in stage 2
  logic [CW-1:0]        count;               // entries in the buffer
  gf_t                  buf_alpha [BLOCK];
  gf_t                  buf_v     [BLOCK];
  logic                 issue;
  logic [CW:0]          reserved;
  gf_t                  g_alpha, v_new;

  assign reserved   = (CW+1)'(count) + (CW+1)'(v1) + (CW+1)'(v2);
  assign issue      = scanning && cipher[k] && (reserved < (CW+1)'(BLOCK));
  assign p_rd_en    = issue;
  assign p_rd_addr  = GF_M'(k);
  // Stage 1 -> 2: the support point addresses the FFT memory row.
  assign fft_rd_en  = v1;
  assign fft_rd_row = p_out[GF_M-1:LW];
  // Stage 2: 1 / g(alpha)^2.
  assign g_alpha    = fft_rd_data[sel2*GF_M +: GF_M];
  assign v_new      = gf_sq(gf_inv(g_alpha));

  // ---------------- accumulation engine ----------------
  typedef enum logic [1:0] {E_IDLE, E_RUN, E_RELEASE} eng_t;
  eng_t                 eng;
  logic [JW-1:0]        j;
  gf_t                  term  [BLOCK];
  gf_t                  alpha [BLOCK];
  gf_t                  s_rot [2*T];         // s_rot[0] is S_j for the current j
  gf_t                  contrib;
  logic                 handoff;
  logic                 scan_over;

  assign scan_over = !scanning && !v1 && !v2;
  assign handoff   = (eng == E_IDLE) &&
                     ((count == CW'(BLOCK)) || (scan_over && count != 0));

  always_comb begin
    contrib = '0;
    for (int l = 0; l < BLOCK; l++) contrib ^= term[l];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      scanning <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      v1       <= 1'b0;
      v2       <= 1'b0;
      count    <= '0;
      eng      <= E_IDLE;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        scanning <= 1'b1;
        k        <= ($clog2(MT))'(MT-1);
        count    <= '0;
        for (int i = 0; i < 2*T; i++) s_rot[i] <= '0;
      end else if (busy) begin
        // scan: advance past zeros, and past ones that got a buffer slot
        if (scanning && (!cipher[k] || issue)) begin
          if (k == 0) scanning <= 1'b0;
          else        k <= k - 1'b1;
        end
        v1   <= issue;
        v2   <= v1;
        sel2 <= p_out[LW-1:0];
        pt2  <= p_out;
        // buffer write (stage 2) and hand-off to the engine
        if (handoff) begin
          for (int l = 0; l < BLOCK; l++) begin
            alpha[l] <= buf_alpha[l];
            term[l]  <= (CW'(l) < count) ? buf_v[l] : gf_t'(0);
          end
          count <= '0;
          eng   <= E_RUN;
          j     <= '0;
        end else if (v2) begin
          buf_alpha[count] <= support_to_gf(pt2);
          buf_v[count]     <= v_new;
          count            <= count + 1'b1;
        end
        // engine
        case (eng)
          E_RUN: begin
            for (int i = 0; i < 2*T-1; i++) s_rot[i] <= s_rot[i+1];
            s_rot[2*T-1] <= s_rot[0] ^ contrib;
            for (int l = 0; l < BLOCK; l++) term[l] <= gf_mul(term[l], alpha[l]);
            j <= j + 1'b1;
            if (j == JW'(2*T-1)) eng <= E_RELEASE;
          end
          E_RELEASE: eng <= E_IDLE;
          default: ;
        endcase
        // finished: scan over, buffer empty, engine idle
        if (scan_over && count == 0 && eng == E_IDLE && !handoff) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_comb
    for (int i = 0; i < 2*T; i++) synd[i*GF_M +: GF_M] = s_rot[i];

endmodule
