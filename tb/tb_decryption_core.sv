// tb_decryption_core: decrypts random ciphertexts with the core at its full
// size (n = 3488, t = 64) and checks the recovered plaintext bit by bit
// against the error vector the ciphertext was made from, plus the cycle count
// of every step: 1050 for each evaluation, 1921 for Berlekamp-Massey, 3498 for
// plaintext recovery and 4 + 130*ceil(ones/20) + A for the double syndrome
// (A: bits scanned from the MSB until the 20th one), each plus the one-cycle
// hand-over of the sequencer. Cases: a random error, and an error that
// includes the support point 0 and the last support index.
module tb_decryption_core;
  import mce_pkg::*;
  import tb_mce_pkg::*;

  localparam int N = 3488, T = 64, MT = 768;

  logic clk = 0, rst = 1, start = 0;
  logic [(T+1)*12-1:0] poly_g;
  logic [MT-1:0] ciphertext;
  logic P_rd_en;
  logic [11:0] P_rd_addr, P_out;
  logic done;
  logic [N-1:0] error_recovered;
  step_t step;
  int checks = 0, failures = 0;
  logic [11:0] supp_mem [4096];

  always #5 clk = ~clk;

  decryption_core dut (.*);

  always_ff @(posedge clk) if (P_rd_en) P_out <= supp_mem[P_rd_addr];

  initial begin
    #(10 * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_case(mce_case mc);
    int cyc, dur[6], ones, a_bits, seen, nerr;
    step_t prev;
    for (int i = 0; i < N; i++) supp_mem[i] = mc.support[i];
    for (int i = 0; i <= T; i++) poly_g[12*i +: 12] = mc.g[i];
    for (int k = 0; k < MT; k++) ciphertext[k] = mc.c[k];
    ones = 0; a_bits = MT; seen = 0;
    for (int k = MT - 1; k >= 0; k--) if (mc.c[k]) begin
      ones++;
      if (ones == 20) a_bits = MT - k;
    end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    foreach (dur[i]) dur[i] = 0;
    cyc = 1; prev = step;
    while (!done) begin
      dur[int'(step)]++;
      @(negedge clk);
      cyc++;
    end
    check(dur[1] == 1050 + 1, $sformatf("g evaluation took %0d cycles", dur[1]));
    check(dur[2] == 4 + 130 * ((ones + 19) / 20) + a_bits + 1,
          $sformatf("double syndrome took %0d cycles, ones=%0d A=%0d", dur[2], ones, a_bits));
    check(dur[3] == 1921 + 1, $sformatf("BM took %0d cycles", dur[3]));
    check(dur[4] == 1050 + 1, $sformatf("ELP evaluation took %0d cycles", dur[4]));
    check(dur[5] == 3498 + 1, $sformatf("error locator took %0d cycles", dur[5]));
    nerr = 0;
    for (int i = 0; i < N; i++) begin
      if (error_recovered[N-1-i] != mc.e[i]) nerr++;
    end
    check(nerr == 0, $sformatf("%0d plaintext bits wrong", nerr));
    $display("decryption: %0d cycles, %0d ones in ciphertext, steps %0d/%0d/%0d/%0d/%0d",
             cyc, ones, dur[1], dur[2], dur[3], dur[4], dur[5]);
  endtask

  initial begin
    mce_case mc;
    int forced[$];
    void'($urandom(11));
    mc = new(N, T);
    repeat (3) @(negedge clk);
    rst = 0;
    // case 1: random key and error
    do void'(mc.make_key(0)); while (!mc.encrypt(forced));
    run_case(mc);
    // case 2: support point 0 at index 1 in error, and the last index
    forced = '{1, N - 1};
    do void'(mc.make_key(1)); while (!mc.encrypt(forced));
    check(mc.support[1] == 0, "support index 1 holds point 0");
    run_case(mc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
