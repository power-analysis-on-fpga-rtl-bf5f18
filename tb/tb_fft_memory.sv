// tb_fft_memory: writes random rows, reads them back in random order and
// checks the data and the one-cycle read latency (read data must not change
// while rd_en is low).
module tb_fft_memory;
  logic clk = 0;
  logic wr_en = 0, rd_en = 0;
  logic [6:0] wr_row, rd_row;
  logic [383:0] wr_data, rd_data;
  logic [383:0] model [128];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fft_memory dut (.*);

  initial begin
    #(10 * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [383:0] held;
    for (int r = 0; r < 128; r++) begin
      @(negedge clk);
      wr_en = 1; wr_row = 7'(r);
      for (int w = 0; w < 12; w++) wr_data[32*w +: 32] = $urandom;
      model[r] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int i = 0; i < 200; i++) begin
      rd_row = 7'($urandom);
      rd_en = 1;
      @(negedge clk);
      checks++;
      if (rd_data !== model[rd_row]) begin failures++; $display("FAIL row %0d", rd_row); end
      held = rd_data;
      rd_en = 0;
      rd_row = rd_row + 1;
      @(negedge clk);
      checks++;
      if (rd_data !== held) begin failures++; $display("FAIL data changed without rd_en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
