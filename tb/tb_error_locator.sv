// tb_error_locator: fills the model support memory with a random support and
// the model FFT memory with random nonzero values and zeros at random points,
// runs plaintext recovery and checks every bit (bit n-1-i is 1 exactly when
// the evaluation at support point i is zero) and the latency of 3498 cycles.
module tb_error_locator;
  import tb_mce_pkg::*;

  localparam int N = 3488;
  logic clk = 0, rst = 1, start = 0;
  logic p_rd_en, fft_rd_en, busy, done;
  logic [11:0] p_rd_addr, p_out;
  logic [6:0] fft_rd_row;
  logic [383:0] fft_rd_data;
  logic [N-1:0] error_recovered;
  logic [11:0] supp [4096];
  logic [383:0] ftab [128];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  error_locator dut (.*);

  always_ff @(posedge clk) begin
    if (p_rd_en)   p_out       <= supp[p_rd_addr];
    if (fft_rd_en) fft_rd_data <= ftab[fft_rd_row];
  end

  initial begin
    #(10 * 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm[Q];
    int cyc, bad, ones;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int trial = 0; trial < 3; trial++) begin
      rand_perm(perm);
      for (int i = 0; i < 4096; i++) supp[i] = 12'(perm[i]);
      for (int r = 0; r < 128; r++)
        for (int l = 0; l < 32; l++)
          ftab[r][12*l +: 12] = ($urandom_range(63, 0) == 0) ? 12'd0 : 12'($urandom_range(4095, 1));
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 3498) begin failures++; $display("FAIL latency %0d", cyc); end
      bad = 0; ones = 0;
      for (int i = 0; i < N; i++) begin
        logic [11:0] k;
        logic [383:0] row;
        k = supp[i];
        row = ftab[k[11:5]];
        if (error_recovered[N-1-i] != (row[12*k[4:0] +: 12] == 0)) bad++;
        ones += int'(error_recovered[N-1-i]);
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL trial %0d: %0d bits wrong", trial, bad); end
      $display("trial %0d: %0d ones recovered", trial, ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
