// tb_decbp_gateway: end-to-end test of the memory-mapped scheduler with a
// host model of the switch datapath, at the default 4 x 4, n = 3 size.
//
// The testbench plays the host of a 4 x 4 input-queued switch with MC-VOQ
// queues: each timeslot it adds Bernoulli arrivals, writes all 60 queue
// lengths into the 30 length registers, writes 0x1 to control, polls control
// until it reads 0x2, reads the result register and executes the decision
// (one copy per output in tau, the head of queue sigma leaves it, and a
// residual packet joins queue sigma \ tau). It checks every decision for
// feasibility (tau within sigma, served queue non-empty, no output twice),
// that control reads 0x1 while running and that writes then are ignored,
// the cycle count of each run, and the throughput of two concentrated
// traffic patterns against the values reported for this scheduler
// (Conc-1: 0.75, Conc-2: 0.97; accepted within +-0.04).
// Mechanisms counted: fanout splitting with re-enqueueing, multicast
// copies, empty decisions with packets waiting, ignored writes while busy.
module tb_decbp_gateway;
  localparam int N = 4, M = 4, S = 16;
  localparam int SLOTS = 3000;
  localparam int LAT = 81 + 2 + N * (3 + 1) * (S + 1);  // core latency, edges

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        wr_en = 0, rd_en = 0;
  logic [4:0]  addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic        rd_valid, ctrl_irq;

  decbp_gateway dut (.clk, .rst_n, .wr_en, .rd_en, .addr, .wr_data, .rd_data, .rd_valid, .ctrl_irq);

  int checks = 0, failures = 0;
  int n_split = 0, n_multi = 0, n_idle_wait = 0, n_ignored = 0, n_busy_seen = 0;
  int ylen [N][S];

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic bus_write(input int a, input logic [31:0] d);
    @(negedge clk); wr_en = 1; addr = 5'(a); wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic bus_read(input int a, output logic [31:0] d);
    @(negedge clk); rd_en = 1; addr = 5'(a);
    @(negedge clk); rd_en = 0;
    d = rd_data;
    if (!rd_valid) begin failures++; $display("FAIL: rd_valid missing"); end
  endtask

  function automatic int popc(int v); int c = 0; for (int k = 0; k < M; k++) c += (v >> k) & 1; return c; endfunction
  // fanout mask of a set of 1-based port numbers: port p is bit M-p
  function automatic int pmask(int p1, int p2, int p3 = 0, int p4 = 0);
    int r = 0;
    if (p1) r |= 1 << (M - p1);
    if (p2) r |= 1 << (M - p2);
    if (p3) r |= 1 << (M - p3);
    if (p4) r |= 1 << (M - p4);
    return r;
  endfunction

  // one timeslot: push lengths, run, read decision, execute it; returns copies sent
  task automatic timeslot(output int copies);
    logic [31:0] d;
    int t0, t1, waited;
    for (int r = 0; r < 30; r++) begin
      int q0 = 2 * r, q1 = 2 * r + 1;
      bus_write(r, {16'(ylen[q1 / 15][q1 % 15 + 1]), 16'(ylen[q0 / 15][q0 % 15 + 1])});
    end
    bus_write(30, 32'h1);
    t0 = $time / 10;
    // control reads 0x1 while the scheduler runs; writes are ignored then
    bus_read(30, d);
    check(d == 32'h1, $sformatf("control reads %h while running", d));
    if (d == 32'h1) n_busy_seen++;
    bus_write(0, 32'hFFFF_FFFF);
    bus_read(0, d);
    check(d == {16'(ylen[0][2]), 16'(ylen[0][1])}, "length write while running must be ignored");
    n_ignored++;
    waited = 0;
    do begin bus_read(30, d); waited++; end while (d != 32'h2 && waited < 1000);
    t1 = $time / 10;
    check(d == 32'h2 && ctrl_irq, "control reaches 0x2 with irq");
    // the poll needs 2 cycles per read; the run ends within LAT + 3 cycles of start
    check(t1 - t0 <= LAT + 6 && t1 - t0 >= LAT - 4, $sformatf("run took %0d cycles", t1 - t0));
    bus_read(31, d);
    copies = 0;
    begin
      int used = 0;
      for (int i = 0; i < N; i++) begin
        int sg = int'(d[8*i+4 +: 4]), tu = int'(d[8*i +: 4]);
        int waiting = 0;
        for (int s = 1; s < S; s++) waiting += ylen[i][s];
        if (tu == 0) begin
          check(sg == 0, "empty tau must come with empty sigma");
          if (waiting > 0) n_idle_wait++;
          continue;
        end
        check((sg & tu) == tu, $sformatf("tau %h not within sigma %h", tu, sg));
        check(ylen[i][sg] > 0, $sformatf("input %0d served empty queue %h", i, sg));
        check((used & tu) == 0, "output granted twice");
        used |= tu;
        ylen[i][sg]--;
        if (sg != tu) begin ylen[i][sg & ~tu]++; n_split++; end
        if (popc(tu) > 1) n_multi++;
        copies += popc(tu);
      end
    end
  endtask

  // concentrated traffic: every input i < 2 gets a packet with probability
  // rho, fanout chosen uniformly among its two sets
  task automatic run_pattern(input string name, input int sets [2][2], input real rho,
                             input real expect_tp);
    longint copies_total = 0;
    int copies;
    for (int i = 0; i < N; i++) for (int s = 0; s < S; s++) ylen[i][s] = 0;
    for (int t = 0; t < SLOTS; t++) begin
      for (int i = 0; i < 2; i++)
        if ($urandom_range(0, 9999) < int'(rho * 10000.0))
          ylen[i][sets[i][$urandom_range(0, 1)]]++;
      timeslot(copies);
      copies_total += copies;
    end
    begin
      real tp = real'(copies_total) / real'(SLOTS * M);
      $display("%s: throughput %0.3f (reported %0.2f)", name, tp, expect_tp);
      check(tp > expect_tp - 0.04 && tp < expect_tp + 0.04, $sformatf("%s throughput %0.3f", name, tp));
    end
  endtask

  initial begin
    int c1 [2][2], c2 [2][2];
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    bus_read(30, d);
    check(d == 0 && !ctrl_irq, "control is 0 after reset");
    c1 = '{'{pmask(1, 2), pmask(3, 4)}, '{pmask(1, 3), pmask(2, 4)}};
    c2 = '{'{pmask(1, 2, 3), pmask(2, 3, 4)}, '{pmask(1, 2, 4), pmask(1, 3, 4)}};
    run_pattern("Conc-1", c1, 1.0, 0.75);
    run_pattern("Conc-2", c2, 0.67, 0.97);
    $display("splits=%0d multicast=%0d empty-with-waiting=%0d busy-reads=%0d ignored-writes=%0d",
             n_split, n_multi, n_idle_wait, n_busy_seen, n_ignored);
    check(n_split > 0, "fanout splitting happened");
    check(n_multi > 0, "multicast transfer happened");
    check(n_idle_wait > 0, "empty decision with waiting packets happened");
    check(n_busy_seen > 0 && n_ignored > 0, "busy control and ignored writes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 600 * (2 * SLOTS + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
