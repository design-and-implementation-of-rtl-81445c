// mp_input: max-pressure unit of one input port.
//
// For every transmission fanout set tau it finds the queue sigma (a superset
// of tau) that maximises the max-pressure weight
//     y[sigma] - y[sigma \ tau]
// i.e. the length of the served queue minus the length of the queue that
// receives the residual fanout. The best weight is w[tau], the best queue is
// shat[tau]. The pairs (sigma, tau) are presented one per cycle by a shared
// sequencer (max_pressure); this unit compares and keeps the running maximum.
//
// Interface: clr (one cycle) resets every w[tau] to the most negative value;
// en with sigma/tau presents one pair. Ties keep the pair seen first, so for
// tau = {} the first pair, sigma = {}, gives w = 0 and shat = {}.
// The empty queue y[0] is read as zero whatever the input holds.
module mp_input #(
  parameter int unsigned M     = decbp_pkg::M_OUT_DEF,
  parameter int unsigned LEN_W = decbp_pkg::LEN_W_DEF,
  parameter int unsigned W_W   = decbp_pkg::msg_width(LEN_W, M)
) (
  input  logic                    clk,
  input  logic                    clr,
  input  logic                    en,
  input  logic [M-1:0]            sigma,
  input  logic [M-1:0]            tau,
  input  logic [LEN_W-1:0]        y     [1<<M],
  output logic signed [W_W-1:0]   w     [1<<M],
  output logic [M-1:0]            shat  [1<<M]
);
  localparam int unsigned S = 1 << M;

  logic [M-1:0]          rem;
  logic [LEN_W-1:0]      y_srv, y_res;
  logic signed [W_W-1:0] diff;

  always_comb begin
    rem   = sigma & ~tau;
    y_srv = (sigma == '0) ? '0 : y[sigma];
    y_res = (rem   == '0) ? '0 : y[rem];
    diff  = W_W'(signed'({1'b0, y_srv})) - W_W'(signed'({1'b0, y_res}));
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int unsigned t = 0; t < S; t++) begin
        w[t]    <= {1'b1, {(W_W-1){1'b0}}};
        shat[t] <= '0;
      end
    end else if (en && (diff > w[tau])) begin
      w[tau]    <= diff;
      shat[tau] <= sigma;
    end
  end

endmodule
