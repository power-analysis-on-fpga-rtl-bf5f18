// tb_double_syndrome: with a random support and a random table of g(alpha)
// values in the model memories, computes the 128 syndromes of random
// ciphertexts and compares them with S_j = sum_{c_k=1} alpha_k^j / g(alpha_k)^2
// worked out here. Also checks the run time 4 + 130*ceil(ones/20) + A for
// dense ciphertexts (A: bits scanned from the MSB until the 20th one), that a
// ciphertext with fewer ones than a block (a single partial block) works, and
// that an all-zero ciphertext gives zero syndromes.
module tb_double_syndrome;
  import tb_mce_pkg::*;

  localparam int T = 64, MT = 768;
  logic clk = 0, rst = 1, start = 0;
  logic [MT-1:0] cipher;
  logic p_rd_en, fft_rd_en, busy, done;
  logic [11:0] p_rd_addr, p_out;
  logic [6:0] fft_rd_row;
  logic [383:0] fft_rd_data;
  logic [2*T*12-1:0] synd;
  logic [11:0] supp [4096];
  logic [383:0] ftab [128];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  double_syndrome dut (.*);

  always_ff @(posedge clk) begin
    if (p_rd_en)   p_out       <= supp[p_rd_addr];
    if (fft_rd_en) fft_rd_data <= ftab[fft_rd_row];
  end

  initial begin
    #(10 * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] gval(logic [11:0] k);
    logic [383:0] row;
    row = ftab[k[11:5]];
    return row[12*k[4:0] +: 12];
  endfunction

  initial begin
    int perm[Q];
    int cyc, ones, a_bits, bad;
    rand_perm(perm);
    for (int i = 0; i < 4096; i++) supp[i] = 12'(perm[i]);
    for (int r = 0; r < 128; r++)
      for (int l = 0; l < 32; l++) ftab[r][12*l +: 12] = 12'($urandom_range(4095, 1));
    repeat (2) @(negedge clk);
    rst = 0;
    for (int trial = 0; trial < 5; trial++) begin
      for (int k = 0; k < MT; k++)
        case (trial)
          0, 1:    cipher[k] = 1'($urandom);
          2:       cipher[k] = ($urandom_range(3, 0) != 0);
          3:       cipher[k] = (k % 97 == 3);        // 8 ones: one partial block
          default: cipher[k] = 1'b0;
        endcase
      ones = 0; a_bits = MT;
      for (int k = MT - 1; k >= 0; k--) if (cipher[k]) begin
        ones++;
        if (ones == 20) a_bits = MT - k;
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      if (trial < 3) begin
        checks++;
        if (cyc != 4 + 130 * ((ones + 19) / 20) + a_bits) begin
          failures++; $display("FAIL trial %0d: %0d cycles, ones=%0d A=%0d", trial, cyc, ones, a_bits);
        end
      end
      bad = 0;
      for (int j = 0; j < 2*T; j++) begin
        logic [11:0] s, a, v;
        s = '0;
        for (int k = 0; k < MT; k++) if (cipher[k]) begin
          a = rf_rev(supp[k]);
          v = rf_inv(rf_mul(gval(supp[k]), gval(supp[k])));
          s ^= rf_mul(v, rf_pow(a, j));
        end
        if (synd[12*j +: 12] != s) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL trial %0d: %0d syndromes wrong", trial, bad); end
      $display("trial %0d: %0d ones, %0d cycles", trial, ones, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
