// tb_decbp_regif: register map and control protocol of the register file.
//
// The scheduler side is played by the testbench. Checked: every length
// register writes two 16-bit lengths to the right queues (q = i*15 + s - 1,
// low half even q) and reads back; y[i][0] is always 0; writing 0x1 to
// control gives one start pulse and control reads 0x1; while running, writes
// to lengths and control are ignored; done turns control to 0x2 and raises
// ctrl_irq; the result register packs {sigma_i, tau_i} of input i in bits
// [8i+7:8i]; reads answer one cycle later with rd_valid.
module tb_decbp_regif;
  localparam int N = 4, M = 4, S = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [4:0] addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic rd_valid, ctrl_irq, start, done = 0;
  logic [15:0] y [N][S];
  logic [M-1:0] sigma [N], tau [N];
  int checks = 0, failures = 0, n_start = 0;

  decbp_regif dut (.clk, .rst_n, .wr_en, .rd_en, .addr, .wr_data, .rd_data, .rd_valid, .ctrl_irq,
                   .y, .start, .done, .sigma, .tau);

  always @(posedge clk) if (start) n_start++;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); wr_en = 1; addr = 5'(a); wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask
  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); rd_en = 1; addr = 5'(a);
    @(negedge clk); rd_en = 0; d = rd_data;
    check(rd_valid, "rd_valid one cycle after rd_en");
  endtask

  logic [15:0] ref_len [60];

  initial begin
    logic [31:0] d;
    for (int i = 0; i < N; i++) begin sigma[i] = '0; tau[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 20; pass++) begin
      for (int q = 0; q < 60; q++) ref_len[q] = 16'($urandom);
      for (int r = 0; r < 30; r++) wr(r, {ref_len[2*r+1], ref_len[2*r]});
      for (int r = 0; r < 30; r++) begin
        rd(r, d);
        check(d == {ref_len[2*r+1], ref_len[2*r]}, $sformatf("length register %0d reads %h", r, d));
      end
      for (int i = 0; i < N; i++) begin
        check(y[i][0] == 0, "empty-set length is 0");
        for (int s = 1; s < S; s++)
          check(y[i][s] == ref_len[i*15 + s - 1], $sformatf("y[%0d][%0d]", i, s));
      end
      // start
      n_start = 0;
      wr(30, 32'h1);
      rd(30, d);
      check(d == 32'h1 && !ctrl_irq, "control reads 0x1 while running");
      wr(3, 32'h0);
      wr(30, 32'h1);
      check(n_start == 1, $sformatf("%0d start pulses", n_start));
      rd(3, d);
      check(d == {ref_len[7], ref_len[6]}, "length write ignored while running");
      // scheduler finishes
      for (int i = 0; i < N; i++) begin sigma[i] = M'($urandom); tau[i] = M'($urandom); end
      @(negedge clk); done = 1;
      @(negedge clk); done = 0;
      rd(30, d);
      check(d == 32'h2 && ctrl_irq, "control reads 0x2 after done");
      rd(31, d);
      for (int i = 0; i < N; i++)
        check(d[8*i +: 8] == {sigma[i], tau[i]}, $sformatf("result field %0d", i));
      // a stray done while idle changes nothing
      wr(30, 32'h0);
      @(negedge clk); done = 1;
      @(negedge clk); done = 0;
      rd(30, d);
      check(d == 32'h0, "done while idle ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(10 * 200 * 20 + 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
