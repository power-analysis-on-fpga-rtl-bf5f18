// tb_poly_evaluator: evaluates random degree-64 polynomials and checks every
// one of the 4096 results written to the FFT memory rows against a direct sum
// of powers, then checks the latency (1050 cycles from start to done) and that
// exactly 128 rows were written.
module tb_poly_evaluator;
  import tb_mce_pkg::*;

  localparam int DEG = 64;
  logic clk = 0, rst = 1, start = 0;
  logic [(DEG+1)*12-1:0] coeffs;
  logic wr_en, busy, done;
  logic [6:0] wr_row;
  logic [383:0] wr_data;
  logic [383:0] table_q [128];
  int writes;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  poly_evaluator dut (.*);

  always_ff @(posedge clk) if (wr_en) begin
    table_q[wr_row] <= wr_data;
    writes <= writes + 1;
  end

  initial begin
    #(10 * 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] c[];
    int cyc, bad;
    c = new[DEG+1];
    repeat (2) @(negedge clk);
    rst = 0;
    for (int trial = 0; trial < 2; trial++) begin
      foreach (c[i]) c[i] = 12'($urandom);
      if (trial == 1) c[DEG] = 12'd1;
      foreach (c[i]) coeffs[12*i +: 12] = c[i];
      writes = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 1050) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++;
      if (writes != 128) begin failures++; $display("FAIL %0d rows written", writes); end
      for (int r = 0; r < 128; r++) begin
        bad = 0;
        for (int l = 0; l < 32; l++)
          if (table_q[r][12*l +: 12] != rf_eval(c, rf_rev(12'(32*r + l)))) bad++;
        checks++;
        if (bad != 0) begin failures++; $display("FAIL row %0d: %0d wrong", r, bad); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
