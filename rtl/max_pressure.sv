// max_pressure: step 0 of DEC-BPn for all inputs at once.
//
// A sequencer walks through all 3^M pairs (sigma, tau) with tau a subset of
// sigma, one pair per cycle, and every input's mp_input unit evaluates the
// same pair in parallel (spatial parallelism across inputs). The pair is kept
// as M ternary digits, one per output bit: 0 = bit not in sigma, 1 = bit in
// sigma but not in tau (residual), 2 = bit in tau. For M = 4 this is 81
// cycles, one state per pair.
//
// Timing: a start pulse clears the weights; the next 3^M cycles evaluate the
// pairs; done pulses one cycle after the last pair, when w and shat hold the
// final weights w[i][tau] and best queues shat[i][tau]. start is ignored
// while busy. Reset is synchronous and active low.
module max_pressure #(
  parameter int unsigned N     = decbp_pkg::N_IN_DEF,
  parameter int unsigned M     = decbp_pkg::M_OUT_DEF,
  parameter int unsigned LEN_W = decbp_pkg::LEN_W_DEF,
  parameter int unsigned W_W   = decbp_pkg::msg_width(LEN_W, M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [LEN_W-1:0]        y    [N][1<<M],
  output logic                    busy,
  output logic                    done,
  output logic signed [W_W-1:0]   w    [N][1<<M],
  output logic [M-1:0]            shat [N][1<<M]
);
  logic [1:0]   digit [M];
  logic [M-1:0] sigma, tau;
  logic         last;

  always_comb begin
    last = 1'b1;
    for (int unsigned k = 0; k < M; k++) begin
      sigma[k] = (digit[k] != 2'd0);
      tau[k]   = (digit[k] == 2'd2);
      last     = last & (digit[k] == 2'd2);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      for (int unsigned k = 0; k < M; k++) digit[k] <= 2'd0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          for (int unsigned k = 0; k < M; k++) digit[k] <= 2'd0;
        end
      end else begin
        // ternary increment, least significant digit first
        begin
          logic carry;
          carry = 1'b1;
          for (int unsigned k = 0; k < M; k++) begin
            if (carry) begin
              if (digit[k] == 2'd2) digit[k] <= 2'd0;
              else begin
                digit[k] <= digit[k] + 2'd1;
                carry = 1'b0;
              end
            end
          end
        end
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_in
    mp_input #(.M(M), .LEN_W(LEN_W), .W_W(W_W)) u_mp (
      .clk  (clk),
      .clr  (start && !busy),
      .en   (busy),
      .sigma(sigma),
      .tau  (tau),
      .y    (y[i]),
      .w    (w[i]),
      .shat (shat[i])
    );
  end

endmodule
