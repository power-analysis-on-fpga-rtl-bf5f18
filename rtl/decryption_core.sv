// decryption_core: Niederreiter decryption of Classic McEliece
// (mceliece348864: m = 12, n = 3488, t = 64).
//
// Given the secret Goppa polynomial g(x), the secret support alpha_0..alpha_{n-1}
// and a ciphertext c of m*t bits (the syndrome of the plaintext under the
// systematic public key), it recovers the weight-t plaintext e in five steps:
//   1. evaluate g(x) at all 2^m field elements into the FFT memory;
//   2. compute the 2t syndromes of (c | 0) with respect to g(x)^2, reading a
//      support point only for each ciphertext bit that is 1;
//   3. run Berlekamp-Massey on them to get the error locator polynomial;
//   4. evaluate the error locator polynomial with the same evaluator, into the
//      same FFT memory;
//   5. for each support point look up its evaluation and set the plaintext bit
//      where it is zero.
// The step order, the shared evaluator with its input multiplexer, the data
// dependent step 2 and the memory interface for the support follow the design;
// the insides of steps 1-4 are this implementation's own (see each unit).
//
// Interface: the port list is the design's (clk, start, poly_g, ciphertext,
// P_rd_en/P_rd_addr/P_out, done, error_recovered) plus a synchronous reset rst
// and the current step (for a capture trigger), both this implementation's
// additions. poly_g holds g_i in bits [12*i +: 12] with g_t = 1; ciphertext bit
// j is row j of the public key times the plaintext; the support memory must
// return P_out one cycle after P_rd_en. Pulse start for one cycle; done pulses
// when error_recovered (error_recovered[n-1-i] = e_i) is valid, and it is held
// until the next start. Latency at the defaults: 1050 + syndrome + 1921 + 1050
// + 3498 cycles plus one cycle per step hand-over.
module decryption_core
  import mce_pkg::*;
#(
  parameter int unsigned N            = 3488,
  parameter int unsigned T            = 64,
  parameter int unsigned BLOCK        = 20,    // double syndrome block size
  parameter int unsigned MUL_SEC_BM   = 20,    // BM discrepancy multipliers
  parameter int unsigned MUL_SEC_STEP = 20,    // BM update multipliers
  parameter int unsigned EVAL_LANES   = 32,    // evaluations per FFT-memory row
  parameter int unsigned EVAL_GROUP   = 8      // FFT-memory rows evaluated together
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [(T+1)*GF_M-1:0]    poly_g,
  input  logic [GF_M*T-1:0]        ciphertext,
  output logic                     P_rd_en,
  output logic [GF_M-1:0]          P_rd_addr,
  input  logic [GF_M-1:0]          P_out,
  output logic                     done,
  output logic [N-1:0]             error_recovered,
  output step_t                    step
);

  localparam int unsigned ROWS = GF_Q / EVAL_LANES;
  localparam int unsigned RW   = $clog2(ROWS);
  localparam int unsigned WW   = EVAL_LANES * GF_M;

  // evaluator
  logic                  ev_start, ev_done, ev_busy, ev_wr_en;
  logic [RW-1:0]         ev_wr_row;
  logic [WW-1:0]         ev_wr_data;
  logic [(T+1)*GF_M-1:0] ev_coeffs, elp;
  // FFT memory read port
  logic                  fm_rd_en;
  logic [RW-1:0]         fm_rd_row;
  logic [WW-1:0]         fm_rd_data;
  // syndrome
  logic                  ds_start, ds_done, ds_busy, ds_p_en, ds_f_en;
  logic [GF_M-1:0]       ds_p_addr;
  logic [RW-1:0]         ds_f_row;
  logic [2*T*GF_M-1:0]   synd;
  // BM
  logic                  bm_start, bm_done, bm_busy;
  // locator
  logic                  el_start, el_done, el_busy, el_p_en, el_f_en;
  logic [GF_M-1:0]       el_p_addr;
  logic [RW-1:0]         el_f_row;

  // the evaluator's input multiplexer: g(x) in step 1, the locator in step 4
  assign ev_coeffs = (step == STEP_EVAL_ELP) ? elp : poly_g;

  poly_evaluator #(.DEG(T), .LANES(EVAL_LANES), .GROUP(EVAL_GROUP)) u_eval (
    .clk, .rst, .start(ev_start), .coeffs(ev_coeffs),
    .wr_en(ev_wr_en), .wr_row(ev_wr_row), .wr_data(ev_wr_data),
    .busy(ev_busy), .done(ev_done));

  fft_memory #(.ROWS(ROWS), .WIDTH(WW)) u_fft_mem (
    .clk, .wr_en(ev_wr_en), .wr_row(ev_wr_row), .wr_data(ev_wr_data),
    .rd_en(fm_rd_en), .rd_row(fm_rd_row), .rd_data(fm_rd_data));

  double_syndrome #(.T(T), .BLOCK(BLOCK), .LANES(EVAL_LANES)) u_synd (
    .clk, .rst, .start(ds_start), .cipher(ciphertext),
    .p_rd_en(ds_p_en), .p_rd_addr(ds_p_addr), .p_out(P_out),
    .fft_rd_en(ds_f_en), .fft_rd_row(ds_f_row), .fft_rd_data(fm_rd_data),
    .synd, .busy(ds_busy), .done(ds_done));

  bm_decoder #(.T(T), .MUL_BM(MUL_SEC_BM), .MUL_STEP(MUL_SEC_STEP)) u_bm (
    .clk, .rst, .start(bm_start), .synd, .elp,
    .busy(bm_busy), .done(bm_done));

  error_locator #(.N(N), .LANES(EVAL_LANES)) u_loc (
    .clk, .rst, .start(el_start),
    .p_rd_en(el_p_en), .p_rd_addr(el_p_addr), .p_out(P_out),
    .fft_rd_en(el_f_en), .fft_rd_row(el_f_row), .fft_rd_data(fm_rd_data),
    .error_recovered, .busy(el_busy), .done(el_done));

  // shared ports: the syndrome and locator steps never overlap
  assign P_rd_en   = (step == STEP_LOCATE) ? el_p_en   : ds_p_en;
  assign P_rd_addr = (step == STEP_LOCATE) ? el_p_addr : ds_p_addr;
  assign fm_rd_en  = (step == STEP_LOCATE) ? el_f_en   : ds_f_en;
  assign fm_rd_row = (step == STEP_LOCATE) ? el_f_row  : ds_f_row;

  // step sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      step     <= STEP_IDLE;
      ev_start <= 1'b0;
      ds_start <= 1'b0;
      bm_start <= 1'b0;
      el_start <= 1'b0;
      done     <= 1'b0;
    end else begin
      ev_start <= 1'b0;
      ds_start <= 1'b0;
      bm_start <= 1'b0;
      el_start <= 1'b0;
      done     <= 1'b0;
      case (step)
        STEP_IDLE:     if (start) begin step <= STEP_EVAL_G; ev_start <= 1'b1; end
        STEP_EVAL_G:   if (ev_done) begin step <= STEP_SYNDROME; ds_start <= 1'b1; end
        STEP_SYNDROME: if (ds_done) begin step <= STEP_BM; bm_start <= 1'b1; end
        STEP_BM:       if (bm_done) begin step <= STEP_EVAL_ELP; ev_start <= 1'b1; end
        STEP_EVAL_ELP: if (ev_done) begin step <= STEP_LOCATE; el_start <= 1'b1; end
        STEP_LOCATE:   if (el_done) begin step <= STEP_IDLE; done <= 1'b1; end
        default:       step <= STEP_IDLE;
      endcase
    end
  end

  // the steps run one at a time: at most one unit is ever busy
  always_ff @(posedge clk)
    if (!rst)
      assert ($onehot0({ev_busy, ds_busy, bm_busy, el_busy}))
        else $error("more than one decryption unit busy");

endmodule
