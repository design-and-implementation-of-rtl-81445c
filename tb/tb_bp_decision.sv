// tb_bp_decision: belief maximisation with random tie breaking.
//
// Random beliefs and valid flags are presented for 16 fanout sets, four
// inputs per cycle. The chosen (input, tau) must be valid and carry the
// largest valid belief; an all-invalid round must leave best_valid low.
// A round where every candidate has the same belief is repeated many times:
// the winner must not always be the same candidate (ties are random).
module tb_bp_decision;
  localparam int N = 4, M = 4, S = 16;
  localparam int W_W = decbp_pkg::msg_width(16, M);

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  always #5 clk = ~clk;
  logic [M-1:0] tau = '0;
  logic signed [W_W-1:0] m [N];
  logic m_valid [N];
  logic best_valid;
  logic signed [W_W-1:0] best_m;
  logic [1:0] best_in;
  logic [M-1:0] best_tau;
  int checks = 0, failures = 0;

  bp_decision dut (.clk, .rst_n, .clr, .en, .tau, .m, .m_valid, .best_valid, .best_m, .best_in, .best_tau);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int tm [N][S];
  bit tv [N][S];
  int winners [N*S];

  task automatic round(input int mode);
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0; en = 1;
    for (int t = 0; t < S; t++) begin
      tau = M'(t);
      for (int i = 0; i < N; i++) begin
        m[i] = W_W'(tm[i][t]);
        m_valid[i] = tv[i][t];
      end
      @(negedge clk);
    end
    en = 0;
  endtask

  initial begin
    for (int i = 0; i < N; i++) m_valid[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      automatic int mx = -1000000000; automatic bit any = 0;
      for (int i = 0; i < N; i++)
        for (int t = 0; t < S; t++) begin
          tm[i][t] = (n % 2) ? $urandom_range(0, 200000) - 150000 : $urandom_range(0, 3);
          tv[i][t] = (n % 50 == 7) ? 1'b0 : ($urandom_range(0, 3) != 0);
          if (tv[i][t]) begin any = 1; if (tm[i][t] > mx) mx = tm[i][t]; end
        end
      round(0);
      check(best_valid == any, "best_valid");
      if (any) begin
        check(tv[best_in][best_tau] && tm[best_in][best_tau] == mx && int'(best_m) == mx,
              $sformatf("chose %0d/%0d belief %0d, max %0d", best_in, best_tau, best_m, mx));
      end
    end
    // all candidates tie
    for (int k = 0; k < N * S; k++) winners[k] = 0;
    for (int i = 0; i < N; i++) for (int t = 0; t < S; t++) begin tm[i][t] = 7; tv[i][t] = 1; end
    for (int n = 0; n < 200; n++) begin
      round(1);
      winners[int'(best_in) * S + int'(best_tau)]++;
    end
    begin
      automatic int distinct = 0;
      for (int k = 0; k < N * S; k++) if (winners[k] > 0) distinct++;
      $display("distinct tie winners: %0d", distinct);
      check(distinct > 8, "ties are broken at random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(10 * 20 * 620);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
