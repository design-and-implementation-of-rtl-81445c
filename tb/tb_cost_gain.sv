// tb_cost_gain: cost gain of DEC-BPn over greedy longest-queue-first on
// random queue-length matrices, 4 x 4 switch.
//
// Each trial draws all 60 queue lengths from a geometric distribution with
// mean 100, runs three scheduler cores (n = 0, 1 and the default 3) and a
// reference greedy longest-queue-first scheduler (GR-LQF: repeatedly serve
// the longest queue, over all undecided inputs, that still reaches a free
// output, sending to the free outputs of its set), and computes for each
// schedule the max-pressure cost sum_i (y[sigma_i] - y[sigma_i \ tau_i]).
// The gain g = cost(DEC-BPn) / cost(GR-LQF) is averaged over the trials.
// The expected gain for a 4 x 4 switch with several iterations is about
// 1.5; the test accepts 1.35 to 1.65 for n = 3 and requires the gain to
// grow from n = 0 to n = 3. Every schedule is also checked for feasibility.
module tb_cost_gain;
  localparam int N = 4, M = 4, S = 16, LEN_W = 16;
  localparam int TRIALS = 2000;
  localparam int ND = 3;
  localparam int NIT [ND] = '{3, 0, 1};

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic [LEN_W-1:0] y [N][S];
  logic busy [ND], done [ND];
  logic [M-1:0] sg [ND][N], tu [ND][N];

  decbp_core u3 (.clk, .rst_n, .start, .y, .busy(busy[0]), .done(done[0]), .sigma(sg[0]), .tau(tu[0]),
                 .dec_valid(), .dec_in(), .dec_tau(), .dec_sigma(), .dec_m());
  decbp_core #(.N_ITER(0)) u0 (.clk, .rst_n, .start, .y, .busy(busy[1]), .done(done[1]), .sigma(sg[1]), .tau(tu[1]),
                 .dec_valid(), .dec_in(), .dec_tau(), .dec_sigma(), .dec_m());
  decbp_core #(.N_ITER(1)) u1 (.clk, .rst_n, .start, .y, .busy(busy[2]), .done(done[2]), .sigma(sg[2]), .tau(tu[2]),
                 .dec_valid(), .dec_in(), .dec_tau(), .dec_sigma(), .dec_m());

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic int yl(int i, int s); return (s == 0) ? 0 : int'(y[i][s]); endfunction

  function automatic int lqf_cost();
    int act = 'hF, av = 'hF, cost = 0;
    while (act != 0) begin
      int bi = -1, bs = 0, by = 0;
      for (int i = 0; i < N; i++)
        if ((act >> i) & 1)
          for (int s = 1; s < S; s++)
            if ((s & av) != 0 && yl(i, s) > by) begin bi = i; bs = s; by = yl(i, s); end
      if (bi < 0) break;
      cost += yl(bi, bs) - yl(bi, bs & ~av);
      act &= ~(1 << bi);
      av &= ~bs;
    end
    return cost;
  endfunction

  initial begin
    real gsum [ND];
    for (int d = 0; d < ND; d++) gsum[d] = 0.0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < TRIALS; n++) begin
      int lc;
      for (int i = 0; i < N; i++) begin
        y[i][0] = '0;
        for (int s = 1; s < S; s++) begin
          automatic int v = 0;
          while ($urandom_range(0, 100) != 0 && v < 65535) v++;
          y[i][s] = LEN_W'(v);
        end
      end
      lc = lqf_cost();
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (busy[0] || busy[1] || busy[2]) @(negedge clk);
      for (int d = 0; d < ND; d++) begin
        automatic int cost = 0, used = 0;
        for (int i = 0; i < N; i++) begin
          automatic int s = int'(sg[d][i]), t = int'(tu[d][i]);
          check((s & t) == t && (used & t) == 0, "feasible schedule");
          used |= t;
          cost += yl(i, s) - yl(i, s & ~t);
        end
        if (lc > 0) gsum[d] += real'(cost) / real'(lc);
      end
    end
    for (int d = 0; d < ND; d++)
      $display("DEC-BP%0d: average cost gain over GR-LQF %0.3f", NIT[d], gsum[d] / TRIALS);
    check(gsum[0] / TRIALS > 1.35 && gsum[0] / TRIALS < 1.65, "n = 3 gain near 1.5");
    check(gsum[0] > gsum[1], "iterations raise the gain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(10 * 400 * (TRIALS + 10));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
