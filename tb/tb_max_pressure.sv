// tb_max_pressure: checks the max-pressure weights of all inputs.
//
// For random queue lengths (including the all-zero case and many-tie cases)
// the reference computes, by brute force over every sigma that contains tau,
// w[i][tau] = max(y[sigma] - y[sigma \ tau]); the unit's w must equal it and
// its shat must be a superset of tau that reaches that weight. The empty
// set must give w = 0 and shat = {} even when y[i][0] holds garbage. The
// run must take exactly 3^M = 81 cycles from start to done.
module tb_max_pressure;
  localparam int N = 4, M = 4, S = 16, LEN_W = 16;
  localparam int W_W = decbp_pkg::msg_width(LEN_W, M);

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic [LEN_W-1:0] y [N][S];
  logic busy, done;
  logic signed [W_W-1:0] w [N][S];
  logic [M-1:0] shat [N][S];

  max_pressure dut (.clk, .rst_n, .start, .y, .busy, .done, .w, .shat);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic int yl(int i, int s); return (s == 0) ? 0 : int'(y[i][s]); endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int t0, t1;
      for (int i = 0; i < N; i++) begin
        y[i][0] = LEN_W'($urandom);
        for (int s = 1; s < S; s++)
          case (n % 3)
            0: y[i][s] = (n == 0) ? '0 : LEN_W'($urandom);
            1: y[i][s] = LEN_W'($urandom_range(0, 3));
            default: y[i][s] = LEN_W'($urandom_range(0, 300));
          endcase
      end
      @(negedge clk); start = 1; t0 = cycle;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      t1 = cycle;
      check(t1 - t0 == 81 + 1, $sformatf("took %0d cycles", t1 - t0));
      for (int i = 0; i < N; i++)
        for (int t = 0; t < S; t++) begin
          automatic int best = -1000000, s = int'(shat[i][t]);
          for (int s2 = 0; s2 < S; s2++)
            if ((s2 & t) == t && yl(i, s2) - yl(i, s2 & ~t) > best) best = yl(i, s2) - yl(i, s2 & ~t);
          check(int'(w[i][t]) == best, $sformatf("w[%0d][%0d]=%0d expected %0d", i, t, w[i][t], best));
          check((s & t) == t && yl(i, s) - yl(i, s & ~t) == best, $sformatf("shat[%0d][%0d]=%0d", i, t, s));
        end
      for (int i = 0; i < N; i++) check(w[i][0] == 0 && shat[i][0] == 0, "empty tau gives no queue");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 100 * 210);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
