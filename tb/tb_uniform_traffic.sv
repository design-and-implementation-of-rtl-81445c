// tb_uniform_traffic: the scheduler at the 10-output sizes of the uniform
// traffic experiments (every non-empty fanout set equally likely, load at
// the admissible maximum rho_max = (2^M - 1) / (N 2^(M-1))): 2 x 10, 4 x 10
// and 10 x 10, each with 3 BP iterations, running side by side.
//
// Every decision is checked for feasibility (tau within sigma, served queue
// non-empty, no output twice). A simulation can afford only some tens of
// timeslots of 67,000 to 100,000 cycles each, far too few for the queues to
// reach the long-run state in which the maximum throughputs of these
// scenarios (0.95, 0.97 and 1.00) are defined. The queues therefore start
// backlogged (about 100 packets each), and the short-run throughput is only
// held to loose lower bounds: 0.70, 0.85 and 0.95.
module tb_uniform_traffic;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fin [3];
  int c [3], f [3], tp [3], sp [3];
  localparam int LOW [3] = '{700000, 850000, 950000};
  localparam string NAME [3] = '{"2x10", "4x10", "10x10"};

  uniform_host #(.N(2), .M(10), .RHO_PPM(999023), .WARM(10), .SLOTS(50), .PRELOAD(100)) h2 (
    .clk, .rst_n, .fin(fin[0]), .checks(c[0]), .failures(f[0]), .tp_ppm(tp[0]), .splits(sp[0]));
  uniform_host #(.N(4), .M(10), .RHO_PPM(499511), .WARM(10), .SLOTS(50), .PRELOAD(100)) h4 (
    .clk, .rst_n, .fin(fin[1]), .checks(c[1]), .failures(f[1]), .tp_ppm(tp[1]), .splits(sp[1]));
  uniform_host #(.N(10), .M(10), .RHO_PPM(199805), .WARM(4), .SLOTS(16), .PRELOAD(100)) h10 (
    .clk, .rst_n, .fin(fin[2]), .checks(c[2]), .failures(f[2]), .tp_ppm(tp[2]), .splits(sp[2]));

  initial begin
    int checks = 0, failures = 0, splits = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    for (int k = 0; k < 3; k++) begin
      checks += c[k] + 1;
      failures += f[k];
      splits += sp[k];
      $display("%s: short-run throughput %0d ppm, fanout splits %0d", NAME[k], tp[k], sp[k]);
      if (tp[k] < LOW[k]) begin failures++; $display("FAIL: %s throughput below %0d ppm", NAME[k], LOW[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(64'd10 * 64'd80000 * 64'd80);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
