// tb_bm_decoder: builds the 2t = 128 syndromes of random weight-64 error sets
// (S_j = sum_i w_i alpha_i^j with random nonzero weights w_i, the form of the
// double syndrome), runs the decoder and checks that the locator vanishes at
// every error point and has exactly 64 roots over the whole field. One set
// includes the point 0. Also checks the latency of 1921 cycles.
module tb_bm_decoder;
  import tb_mce_pkg::*;

  localparam int T = 64;
  logic clk = 0, rst = 1, start = 0;
  logic [2*T*12-1:0] synd;
  logic [(T+1)*12-1:0] elp;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bm_decoder dut (.*);

  initial begin
    #(10 * 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm[Q];
    logic [11:0] pts[T], w[T], c[];
    int cyc, roots, miss;
    c = new[T+1];
    repeat (2) @(negedge clk);
    rst = 0;
    for (int trial = 0; trial < 4; trial++) begin
      rand_perm(perm);
      for (int i = 0; i < T; i++) begin
        pts[i] = 12'(perm[i]);
        w[i]   = 12'($urandom_range(4095, 1));
      end
      if (trial == 1) begin
        for (int i = 0; i < T; i++) if (pts[i] == 0) pts[i] = 12'(perm[T]);
        pts[5] = 12'd0;
      end
      for (int j = 0; j < 2*T; j++) begin
        logic [11:0] s;
        s = '0;
        for (int i = 0; i < T; i++) s ^= rf_mul(w[i], rf_pow(pts[i], j));
        synd[12*j +: 12] = s;
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 1921) begin failures++; $display("FAIL latency %0d", cyc); end
      for (int i = 0; i <= T; i++) c[i] = elp[12*i +: 12];
      miss = 0;
      for (int i = 0; i < T; i++) if (rf_eval(c, pts[i]) != 0) miss++;
      checks++;
      if (miss != 0) begin failures++; $display("FAIL trial %0d: %0d error points not roots", trial, miss); end
      roots = 0;
      for (int x = 0; x < Q; x++) if (rf_eval(c, 12'(x)) == 0) roots++;
      checks++;
      if (roots != T) begin failures++; $display("FAIL trial %0d: %0d roots", trial, roots); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
