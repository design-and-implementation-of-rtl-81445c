// tb_bp_forward: one input's beliefs and forward messages.
//
// Random weights w[tau] (w[{}] = 0), backward messages b, available-output
// masks and active flags are applied; the unit scans the 16 fanout sets one
// per cycle. Checked: the belief m of every presented set against
// w - sum(b), m_valid against the availability rule, and after the scan
// every f(i->j) against a reference that evaluates eq. 16 directly
// (max(0, max_{tau has j} m + b_j - max_{tau lacks j} m) over available
// sets; 0 for an inactive input or an unavailable output).
module tb_bp_forward;
  localparam int M = 4, S = 16;
  localparam int W_W = decbp_pkg::msg_width(16, M);

  logic clk = 0, clr = 0, en = 0, active = 0;
  always #5 clk = ~clk;
  logic [M-1:0] tau = '0, avail = '0;
  logic signed [W_W-1:0] w [S], b [M], m, f [M];
  logic m_valid;
  int checks = 0, failures = 0;

  bp_forward dut (.clk, .clr, .en, .tau, .active, .avail, .w, .b, .m, .m_valid, .f);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic int bel(int t);
    int v = int'(w[t]);
    for (int k = 0; k < M; k++) if (((t >> k) & 1) == 1) v -= int'(b[k]);
    return v;
  endfunction

  initial begin
    for (int n = 0; n < 500; n++) begin
      w[0] = '0;
      for (int t = 1; t < S; t++) w[t] = W_W'((n % 2) ? $urandom_range(0, 65535) : $urandom_range(0, 5));
      for (int k = 0; k < M; k++) b[k] = W_W'((n % 3 == 0) ? 0 : $urandom_range(0, (n % 2) ? 65535 : 5));
      avail  = (n % 5 == 0) ? '1 : M'($urandom);
      active = (n % 7 != 3);
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0; en = 1;
      for (int t = 0; t < S; t++) begin
        tau = M'(t);
        #1;
        check(int'(m) == bel(t), $sformatf("m[%0d]=%0d expected %0d", t, m, bel(t)));
        check(m_valid == (active && ((t & ~int'(avail)) == 0)), "m_valid");
        @(negedge clk);
      end
      en = 0;
      #1;
      for (int k = 0; k < M; k++) begin
        automatic int mi = -1000000000, mo = -1000000000, e = 0;
        for (int t = 0; t < S; t++)
          if ((t & ~int'(avail)) == 0) begin
            if (((t >> k) & 1) == 1) begin if (bel(t) > mi) mi = bel(t); end
            else if (bel(t) > mo) mo = bel(t);
          end
        if (active && avail[k] && mi + int'(b[k]) - mo > 0) e = mi + int'(b[k]) - mo;
        check(int'(f[k]) == e, $sformatf("f[%0d]=%0d expected %0d", k, f[k], e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(10 * 20 * 510);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
