// bp_forward: belief and forward-message unit of one input port.
//
// Beliefs (eq. 14):   m[tau] = w[tau] - sum over j in tau of b(j->i)
// Forward (eq. 16):   f(i->j) = max{0, max_{tau has j} m[tau] + b(j->i)
//                                      - max_{tau lacks j} m[tau]}
// Only fanout sets made of still-available outputs (tau within avail) take
// part, since decimation removes outputs already granted.
//
// The unit scans the fanout sets one per cycle (en, tau), computing the
// belief of the presented set combinationally (m, m_valid; also used by the
// decision stage) and folding it into two running maxima per output bit:
// max_in[j] over sets containing j and max_out[j] over sets without j.
// After all 2^M sets f[j] is read combinationally from those maxima and the
// current b. f is 0 for an input that has already decided (active = 0) and
// for an output that is no longer available. clr (one cycle) starts a scan.
// b must stay constant during a scan. Width of all values: W_W, signed.
module bp_forward #(
  parameter int unsigned M     = decbp_pkg::M_OUT_DEF,
  parameter int unsigned LEN_W = decbp_pkg::LEN_W_DEF,
  parameter int unsigned W_W   = decbp_pkg::msg_width(LEN_W, M)
) (
  input  logic                    clk,
  input  logic                    clr,
  input  logic                    en,
  input  logic [M-1:0]            tau,
  input  logic                    active,
  input  logic [M-1:0]            avail,
  input  logic signed [W_W-1:0]   w     [1<<M],
  input  logic signed [W_W-1:0]   b     [M],
  output logic signed [W_W-1:0]   m,
  output logic                    m_valid,
  output logic signed [W_W-1:0]   f     [M]
);
  localparam logic signed [W_W-1:0] NEG = {1'b1, {(W_W-1){1'b0}}};

  logic signed [W_W-1:0] max_in  [M];
  logic signed [W_W-1:0] max_out [M];

  always_comb begin
    m = w[tau];
    for (int unsigned k = 0; k < M; k++)
      if (tau[k]) m = m - b[k];
    m_valid = active && ((tau & ~avail) == '0);
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int unsigned k = 0; k < M; k++) begin
        max_in[k]  <= NEG;
        max_out[k] <= NEG;
      end
    end else if (en && m_valid) begin
      for (int unsigned k = 0; k < M; k++) begin
        if (tau[k]) begin
          if (m > max_in[k]) max_in[k] <= m;
        end else begin
          if (m > max_out[k]) max_out[k] <= m;
        end
      end
    end
  end

  always_comb begin
    for (int unsigned k = 0; k < M; k++) begin
      logic signed [W_W-1:0] g;
      g = max_in[k] + b[k] - max_out[k];
      f[k] = (active && avail[k] && (g > 0)) ? g : '0;
    end
  end

endmodule
