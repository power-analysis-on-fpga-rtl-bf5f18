// tb_output_multiplexer: for random 3488-bit vectors, reads all 436 bytes and
// checks byte k against bits 8k+7..8k, and that addresses past the end
// return zero.
module tb_output_multiplexer;
  localparam int N = 3488;
  logic [N-1:0] error_recovered;
  logic [12:0] byte_addr;
  logic [7:0] data;
  int checks = 0, failures = 0;

  output_multiplexer dut (.*);

  initial begin
    for (int trial = 0; trial < 3; trial++) begin
      for (int w = 0; w < N / 32; w++) error_recovered[32*w +: 32] = $urandom;
      for (int k = 0; k < 440; k++) begin
        logic [7:0] exp_d;
        byte_addr = 13'(k);
        #1;
        exp_d = '0;
        for (int b = 0; b < 8; b++) if (8*k + b < N) exp_d[b] = error_recovered[8*k + b];
        checks++;
        if (data !== exp_d) begin failures++; $display("FAIL byte %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
