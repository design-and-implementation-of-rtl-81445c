// tb_bp_backward: backward messages b(j->i) must be the largest forward
// message f(i'->j) of the other inputs, or 0 when all of them are 0.
// Random and sparse forward messages are applied; the reference is a plain
// loop over the other inputs.
module tb_bp_backward;
  localparam int N = 4, M = 4;
  localparam int W_W = decbp_pkg::msg_width(16, M);
  logic signed [W_W-1:0] f [N][M], b [N][M];
  int checks = 0, failures = 0;

  bp_backward dut (.f, .b);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < M; j++)
          f[i][j] = ($urandom_range(0, 2) == 0) ? '0 :
                    W_W'((n % 2) ? $urandom_range(0, 65535) : $urandom_range(0, 3));
      #1;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < M; j++) begin
          automatic int e = 0;
          for (int i2 = 0; i2 < N; i2++) if (i2 != i && int'(f[i2][j]) > e) e = int'(f[i2][j]);
          checks++;
          if (int'(b[i][j]) != e) begin
            failures++;
            $display("FAIL: b[%0d][%0d]=%0d expected %0d", i, j, b[i][j], e);
          end
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
