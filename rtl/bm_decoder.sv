// bm_decoder: constant-time Berlekamp-Massey decoder. From the 2t syndromes
// S_0..S_{2t-1} it finds the connection polynomial C(x) of degree <= t and
// outputs the error locator polynomial as its reversal,
//     elp(x) = x^t * C(1/x),  elp_i = C_{t-i},
// whose roots are exactly the error positions' field elements (a root at 0
// marks an error at the support point 0).
//
// How it works. Every one of the 2t iterations takes the same number of
// cycles whatever the data, as in the constant-time decoder of the design:
//   DISC  ceil((t+1)/MUL_BM) cycles: discrepancy d = sum_i C_i * S_{N-i},
//         MUL_BM multipliers per cycle over a window register W_i = S_{N-i};
//   FRAC  6 cycles: f = d / b, with b^-1 = b^(2^12-2) from an Itoh-Tsujii
//         chain (b^3, b^15, b^255, b^1023, b^2047, then squared and
//         multiplied by d), one shared multiplier per cycle;
//   UPD   ceil((t+1)/MUL_STEP) cycles: C'_i = C_i + f * B_i, MUL_STEP
//         multipliers per cycle;
//   NEXT  1 cycle: if d != 0 and 2L <= N then L = N+1-L, B = C, b = d;
//         B = x*B; shift the next syndrome into the window.
// At the defaults (t = 64, 20 + 20 multipliers) an iteration takes 15 cycles
// and a decode 2t*15 + 1 = 1921 cycles from start to done, the decoder's
// latency in the design. The multiplier counts are the design's parameters;
// the four-phase schedule and the inversion chain are this implementation's
// own.
//
// Interface: pulse start with synd stable (S_j in bits [12*j +: 12]); elp
// (coefficient i in bits [12*i +: 12]) is valid from the done pulse until the
// next start.
module bm_decoder
  import mce_pkg::*;
#(
  parameter int unsigned T        = 64,
  parameter int unsigned MUL_BM   = 20,   // multipliers for the discrepancy
  parameter int unsigned MUL_STEP = 20    // multipliers for the update
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic [2*T*GF_M-1:0]     synd,
  output logic [(T+1)*GF_M-1:0]   elp,
  output logic                    busy,
  output logic                    done
);

  localparam int unsigned NSEC_D = (T + MUL_BM) / MUL_BM;      // ceil((T+1)/MUL_BM)
  localparam int unsigned NSEC_U = (T + MUL_STEP) / MUL_STEP;
  localparam int unsigned NINV   = 6;                            // inversion chain
  localparam int unsigned NMAX   = (NSEC_D > NSEC_U) ? NSEC_D : NSEC_U;
  localparam int unsigned SW     = $clog2((NMAX > NINV ? NMAX : NINV) + 1);
  localparam int unsigned NW     = $clog2(2*T+1);
  localparam int unsigned LW     = $clog2(T+2);

  typedef enum logic [2:0] {S_IDLE, S_DISC, S_FRAC, S_UPD, S_NEXT} state_t;
  state_t state;

  gf_t C  [T+1];
  gf_t Cn [T+1];
  gf_t B  [T+1];
  gf_t W  [T+1];            // W[i] = S_{N-i} (0 for N-i < 0)
  gf_t d, b, f;
  logic [LW-1:0] L;
  logic [NW-1:0] N;
  logic [SW-1:0] sec;
  gf_t d_part;
  gf_t inv_t, inv_p2;       // inversion chain value; b^3 kept for step 3
  gf_t iv_x, iv_y, iv_r;

  // one step of the inversion chain: iv_r = iv_x^(2^k) * iv_y
  always_comb begin
    int k;
    case (int'(sec))
      0:       begin iv_x = b;     k = 1; iv_y = b;      end  // b^3
      1:       begin iv_x = inv_t; k = 2; iv_y = inv_t;  end  // b^15
      2:       begin iv_x = inv_t; k = 4; iv_y = inv_t;  end  // b^255
      3:       begin iv_x = inv_t; k = 2; iv_y = inv_p2; end  // b^1023
      4:       begin iv_x = inv_t; k = 1; iv_y = b;      end  // b^2047
      default: begin iv_x = inv_t; k = 1; iv_y = d;      end  // d * b^4094
    endcase
    for (int j = 0; j < 4; j++)
      if (j < k) iv_x = gf_sq(iv_x);
    iv_r = gf_mul(iv_x, iv_y);
  end

  // partial discrepancy over one section
  always_comb begin
    d_part = '0;
    for (int l = 0; l < MUL_BM; l++) begin
      int i;
      i = int'(sec) * MUL_BM + l;
      if (i <= T) d_part ^= gf_mul(C[i], W[i]);
    end
  end

  function automatic gf_t synd_at(input int unsigned idx);
    return (idx < 2*T) ? synd[idx*GF_M +: GF_M] : gf_t'(0);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          for (int i = 0; i <= T; i++) begin
            C[i] <= (i == 0) ? gf_t'(1) : gf_t'(0);
            B[i] <= (i == 1) ? gf_t'(1) : gf_t'(0);
            W[i] <= (i == 0) ? synd_at(0) : gf_t'(0);
          end
          b     <= gf_t'(1);
          d     <= '0;
          L     <= '0;
          N     <= '0;
          sec   <= '0;
          busy  <= 1'b1;
          state <= S_DISC;
        end
        S_DISC: begin
          d   <= d ^ d_part;
          sec <= sec + 1'b1;
          if (sec == SW'(NSEC_D-1)) begin
            sec   <= '0;
            state <= S_FRAC;
          end
        end
        S_FRAC: begin
          inv_t <= iv_r;
          if (sec == '0) inv_p2 <= iv_r;
          sec   <= sec + 1'b1;
          if (sec == SW'(NINV-1)) begin
            f     <= iv_r;
            sec   <= '0;
            state <= S_UPD;
          end
        end
        S_UPD: begin
          for (int l = 0; l < MUL_STEP; l++) begin
            int i;
            i = int'(sec) * MUL_STEP + l;
            if (i <= T) Cn[i] <= C[i] ^ gf_mul(f, B[i]);
          end
          sec <= sec + 1'b1;
          if (sec == SW'(NSEC_U-1)) begin
            sec   <= '0;
            state <= S_NEXT;
          end
        end
        S_NEXT: begin
          logic upd;
          upd = (d != 0) && (2 * int'(L) <= int'(N));
          for (int i = 0; i <= T; i++) C[i] <= Cn[i];
          // B <- x * (upd ? C : B)
          B[0] <= '0;
          for (int i = 1; i <= T; i++) B[i] <= upd ? C[i-1] : B[i-1];
          if (upd) begin
            L <= LW'(N + 1) - L;
            b <= d;
          end
          // window for the next iteration: W_i = S_{N+1-i}
          W[0] <= synd_at(int'(N) + 1);
          for (int i = 1; i <= T; i++) W[i] <= W[i-1];
          d <= '0;
          N <= N + 1'b1;
          if (N == NW'(2*T-1)) begin
            state <= S_IDLE;
            busy  <= 1'b0;
            done  <= 1'b1;
          end else begin
            state <= S_DISC;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the error locator polynomial is the reversed connection polynomial
  always_comb
    for (int i = 0; i <= T; i++) elp[i*GF_M +: GF_M] = C[T-i];

endmodule
