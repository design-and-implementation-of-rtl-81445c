// tb_decbp_core: self-checking test of the DEC-BPn scheduler core.
//
// Two cores run on the same queue lengths: one with the default 3 BP
// iterations and one with none (DEC-BP0). A reference model written here
// from the algorithm's equations recomputes the max-pressure weights, the BP
// messages and the beliefs for every decimation round. Because ties are
// broken at random inside the core, the reference follows the core's choice
// in each round after checking that it is a legal maximiser: its belief is
// the largest one, its fanout set uses only free outputs, its queue covers
// the set and reaches the set's max-pressure weight, and a zero best belief
// yields an empty decision. The final sigma/tau must equal the round
// choices, outputs must never be granted twice, and the latency must be
// 3^M + 2 + N*(n+1)*(2^M+1) cycles.
module tb_decbp_core;
  localparam int N = 4, M = 4, S = 16, LEN_W = 16;
  localparam int W_W = decbp_pkg::msg_width(LEN_W, M);
  localparam int NTEST = 300;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  logic [LEN_W-1:0] y [N][S];

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---- two DUTs ----
  logic busy [2], done [2];
  logic [M-1:0] sg [2][N], tu [2][N];
  logic dv [2];
  logic [1:0] di [2];
  logic [M-1:0] dt [2], ds [2];
  logic signed [W_W-1:0] dm [2];

  decbp_core dut3 (.clk, .rst_n, .start, .y, .busy(busy[0]), .done(done[0]),
                   .sigma(sg[0]), .tau(tu[0]), .dec_valid(dv[0]), .dec_in(di[0]),
                   .dec_tau(dt[0]), .dec_sigma(ds[0]), .dec_m(dm[0]));
  decbp_core #(.N_ITER(0)) dut0 (.clk, .rst_n, .start, .y, .busy(busy[1]), .done(done[1]),
                   .sigma(sg[1]), .tau(tu[1]), .dec_valid(dv[1]), .dec_in(di[1]),
                   .dec_tau(dt[1]), .dec_sigma(ds[1]), .dec_m(dm[1]));

  localparam int NIT [2] = '{3, 0};

  // ---- reference model ----
  int rw [N][S];
  function automatic int yl(int i, int s);
    return (s == 0) ? 0 : int'(y[i][s]);
  endfunction
  function automatic void ref_weights();
    for (int i = 0; i < N; i++)
      for (int t = 0; t < S; t++) begin
        rw[i][t] = -1000000;
        for (int s = 0; s < S; s++)
          if ((s & t) == t && yl(i, s) - yl(i, s & ~t) > rw[i][t])
            rw[i][t] = yl(i, s) - yl(i, s & ~t);
      end
  endfunction
  function automatic int popc(int v); int c = 0; for (int k = 0; k < M; k++) c += (v >> k) & 1; return c; endfunction

  // beliefs after nit BP iterations for active inputs act and free outputs av
  int rb [N][M];
  function automatic int belief(int i, int t);
    int v = rw[i][t];
    for (int k = 0; k < M; k++) if ((t >> k) & 1) v -= rb[i][k];
    return v;
  endfunction
  function automatic void ref_bp(int nit, int act, int av);
    int f [N][M];
    for (int i = 0; i < N; i++) for (int k = 0; k < M; k++) rb[i][k] = 0;
    for (int it = 0; it < nit; it++) begin
      for (int i = 0; i < N; i++)
        for (int k = 0; k < M; k++) begin
          int mi = -1000000000, mo = -1000000000, g;
          f[i][k] = 0;
          if (((act >> i) & 1) && ((av >> k) & 1)) begin
            for (int t = 0; t < S; t++)
              if ((t & ~av) == 0) begin
                if ((t >> k) & 1) begin if (belief(i, t) > mi) mi = belief(i, t); end
                else if (belief(i, t) > mo) mo = belief(i, t);
              end
            g = mi + rb[i][k] - mo;
            f[i][k] = (g > 0) ? g : 0;
          end
        end
      for (int i = 0; i < N; i++)
        for (int k = 0; k < M; k++) begin
          rb[i][k] = 0;
          for (int i2 = 0; i2 < N; i2++) if (i2 != i && f[i2][k] > rb[i][k]) rb[i][k] = f[i2][k];
        end
    end
  endfunction

  // per-DUT bookkeeping
  int act [2], av [2], ncommit [2], t_start, t_done [2];
  int exp_sg [2][N], exp_tu [2][N];
  int n_split = 0, n_null = 0, n_multi = 0;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL t=%0d: %s", cycle, msg); end
  endtask

  task automatic on_commit(int d);
    int mx = -1000000000, i = int'(di[d]), t = int'(dt[d]), s = int'(ds[d]);
    ref_bp(NIT[d], act[d], av[d]);
    for (int i2 = 0; i2 < N; i2++)
      if ((act[d] >> i2) & 1)
        for (int t2 = 0; t2 < S; t2++)
          if ((t2 & ~av[d]) == 0 && belief(i2, t2) > mx) mx = belief(i2, t2);
    check(int'(dm[d]) == mx, $sformatf("dut%0d best belief %0d, expected %0d", d, dm[d], mx));
    check(((act[d] >> i) & 1) == 1, $sformatf("dut%0d chose decided input %0d", d, i));
    if (mx > 0) begin
      check((t & ~av[d]) == 0 && t != 0, $sformatf("dut%0d tau %h not free (%h)", d, t, av[d]));
      check(belief(i, t) == mx, $sformatf("dut%0d belief of chosen pair %0d != %0d", d, belief(i, t), mx));
      check((s & t) == t && yl(i, s) - yl(i, s & ~t) == rw[i][t],
            $sformatf("dut%0d sigma %h does not reach w[%0d][%h]=%0d", d, s, i, t, rw[i][t]));
      if (s != t) n_split++;
      if (popc(t) > 1) n_multi++;
    end else begin
      check(t == 0 && s == 0, $sformatf("dut%0d zero belief must give empty decision", d));
      n_null++;
    end
    exp_sg[d][i] = s; exp_tu[d][i] = t;
    act[d] &= ~(1 << i);
    av[d] &= ~t;
    ncommit[d]++;
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < 2; d++) begin
      if (dv[d]) on_commit(d);
      if (done[d]) t_done[d] = cycle;
    end
  end

  function automatic int gen_len(int mode);
    case (mode)
      0: return $urandom_range(0, 400);                         // wide spread
      1: return ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 4);  // many ties
      2: begin int v = 0; while ($urandom_range(0, 99) != 0 && v < 65535) v++; return v; end // geometric, mean ~100
      default: return ($urandom_range(0, 3) == 0) ? 65535 : $urandom_range(60000, 65535); // near full scale
    endcase
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NTEST; n++) begin
      automatic int mode = (n == 0) ? 9 : n % 4;
      for (int i = 0; i < N; i++) begin
        y[i][0] = LEN_W'($urandom);   // must be ignored: empty set is no queue
        for (int s = 1; s < S; s++) y[i][s] = (mode == 9) ? '0 : LEN_W'(gen_len(mode));
      end
      ref_weights();
      for (int d = 0; d < 2; d++) begin act[d] = 'hF; av[d] = 'hF; ncommit[d] = 0; t_done[d] = -1; end
      @(negedge clk); start = 1; t_start = cycle;
      @(negedge clk); start = 0;
      while (busy[0] || busy[1]) @(negedge clk);
      @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        check(ncommit[d] == N, $sformatf("dut%0d made %0d decisions", d, ncommit[d]));
        // done rises LATENCY edges after the edge that samples start and is
        // seen here one edge later
        check(t_done[d] - t_start == 81 + 2 + N * (NIT[d] + 1) * (S + 1) + 1,
              $sformatf("dut%0d latency %0d", d, t_done[d] - t_start));
        for (int i = 0; i < N; i++)
          check(int'(sg[d][i]) == exp_sg[d][i] && int'(tu[d][i]) == exp_tu[d][i],
                $sformatf("dut%0d input %0d result %h/%h expected %h/%h", d, i, sg[d][i], tu[d][i], exp_sg[d][i], exp_tu[d][i]));
        // outputs granted at most once
        begin automatic int used = 0; automatic bit ok = 1;
          for (int i = 0; i < N; i++) begin if ((used & int'(tu[d][i])) != 0) ok = 0; used |= int'(tu[d][i]); end
          check(ok, $sformatf("dut%0d output conflict", d));
        end
      end
      if (n == 0) for (int i = 0; i < N; i++) check(tu[0][i] == 0 && sg[0][i] == 0, "empty queues must give no transfer");
    end
    $display("fanout splits=%0d multicast transfers=%0d null decisions=%0d", n_split, n_multi, n_null);
    check(n_split > 0 && n_multi > 0 && n_null > 0, "every decision kind seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 400 * (NTEST + 5));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
