// uniform_host: host model of an N x M switch with MC-VOQ queues driving
// one scheduler core under uniform multicast traffic (testbench helper).
//
// Every timeslot each input receives a packet with probability RHO_PPM/1e6
// whose fanout set is drawn uniformly among the 2^M - 1 non-empty sets. The
// scheduler runs on the queue lengths; the decision is executed (head of
// sigma_i leaves, one copy per output in tau_i, the residual re-enters queue
// sigma_i \ tau_i). Each decision is checked for feasibility. After WARM
// slots, copies delivered during SLOTS slots give the output throughput,
// reported in parts per million. fin rises when the run is over. PRELOAD
// starts every queue backlogged, so that a short run measures the
// saturation throughput instead of the slow build-up from empty queues.
module uniform_host #(
  parameter int N       = 2,
  parameter int M       = 10,
  parameter int RHO_PPM = 1000000,
  parameter int WARM    = 100,
  parameter int SLOTS   = 400,
  parameter int PRELOAD = 0      // initial length of every queue: uniform in [PRELOAD/2, 3*PRELOAD/2]
) (
  input  logic clk,
  input  logic rst_n,
  output logic fin,
  output int   checks,
  output int   failures,
  output int   tp_ppm,
  output int   splits
);
  localparam int S = 1 << M;
  logic start = 0, busy, done;
  logic [15:0] y [N][S];
  logic [M-1:0] sg [N], tu [N];

  decbp_core #(.N(N), .M(M)) u_core (.clk, .rst_n, .start, .y, .busy, .done, .sigma(sg), .tau(tu),
    .dec_valid(), .dec_in(), .dec_tau(), .dec_sigma(), .dec_m());

  int ylen [N][S];
  function automatic int popc(int v); int c = 0; for (int k = 0; k < M; k++) c += (v >> k) & 1; return c; endfunction

  initial begin
    longint copies = 0;
    fin = 0; checks = 0; failures = 0; tp_ppm = 0; splits = 0;
    for (int i = 0; i < N; i++) for (int s = 0; s < S; s++) begin
      ylen[i][s] = (s == 0 || PRELOAD == 0) ? 0 : $urandom_range(PRELOAD / 2, PRELOAD * 3 / 2);
      y[i][s] = '0;
    end
    @(posedge rst_n);
    for (int t = 0; t < WARM + SLOTS; t++) begin
      automatic int used = 0;
      for (int i = 0; i < N; i++)
        if ($urandom_range(0, 999999) < RHO_PPM) ylen[i][$urandom_range(1, S - 1)]++;
      for (int i = 0; i < N; i++) for (int s = 0; s < S; s++) y[i][s] = 16'(ylen[i][s] > 65535 ? 65535 : ylen[i][s]);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      for (int i = 0; i < N; i++) begin
        automatic int s = int'(sg[i]), u = int'(tu[i]);
        checks++;
        if ((s & u) != u || (used & u) != 0 || (u != 0 && ylen[i][s] == 0)) begin
          failures++;
          $display("FAIL: %0dx%0d infeasible decision input %0d sigma %h tau %h", N, M, i, s, u);
        end
        used |= u;
        if (u != 0) begin
          ylen[i][s]--;
          if (s != u) begin ylen[i][s & ~u]++; splits++; end
          if (t >= WARM) copies += popc(u);
        end
      end
    end
    tp_ppm = int'((copies * 1000000) / (longint'(SLOTS) * M));
    $display("%0dx%0d host finished at %0t", N, M, $time);
    fin = 1;
  end
endmodule
