// bp_decision: belief maximisation of one decimation round (DEC-BPn steps
// 7-8): among the inputs still undecided and the fanout sets made of
// available outputs, find the pair (i, tau) with the largest belief m.
//
// The scheduler presents one fanout set per cycle (en, tau) with the belief
// of every input for it (m[i], m_valid[i]); this unit keeps the running best.
// Ties are broken at random, as the algorithm asks: every candidate carries
// a random key taken from a free-running 32-bit LFSR, and on equal beliefs
// the larger key wins (equal keys keep the earlier candidate). The LFSR and
// the key width are this design's choice. clr (one cycle) empties the best.
// best_* are registered and hold the result after the last presented set.
module bp_decision #(
  parameter int unsigned N         = decbp_pkg::N_IN_DEF,
  parameter int unsigned M         = decbp_pkg::M_OUT_DEF,
  parameter int unsigned W_W       = decbp_pkg::msg_width(decbp_pkg::LEN_W_DEF, M),
  parameter logic [31:0] LFSR_SEED = 32'hACE1_2468
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    en,
  input  logic [M-1:0]            tau,
  input  logic signed [W_W-1:0]   m       [N],
  input  logic                    m_valid [N],
  output logic                    best_valid,
  output logic signed [W_W-1:0]   best_m,
  output logic [$clog2(N)-1:0]    best_in,
  output logic [M-1:0]            best_tau
);
  localparam int unsigned KW = decbp_pkg::KEY_W;
  localparam int unsigned IW = $clog2(N);

  logic [31:0]   lfsr;
  logic [KW-1:0] best_key;

  // next running best after this cycle's candidates
  logic                  nx_valid;
  logic signed [W_W-1:0] nx_m;
  logic [IW-1:0]         nx_in;
  logic [M-1:0]          nx_tau;
  logic [KW-1:0]         nx_key;

  always_comb begin
    nx_valid = best_valid;
    nx_m     = best_m;
    nx_in    = best_in;
    nx_tau   = best_tau;
    nx_key   = best_key;
    for (int unsigned i = 0; i < N; i++) begin
      logic [KW-1:0] key;
      key = lfsr[(i*KW) % 32 +: KW] ^ KW'(i);
      if (m_valid[i] &&
          (!nx_valid || (m[i] > nx_m) || ((m[i] == nx_m) && (key > nx_key)))) begin
        nx_valid = 1'b1;
        nx_m     = m[i];
        nx_in    = IW'(i);
        nx_tau   = tau;
        nx_key   = key;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr       <= LFSR_SEED;
      best_valid <= 1'b0;
      best_m     <= '0;
      best_in    <= '0;
      best_tau   <= '0;
      best_key   <= '0;
    end else begin
      // Galois LFSR, polynomial x^32 + x^22 + x^2 + x + 1
      lfsr <= {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
      if (clr) begin
        best_valid <= 1'b0;
        best_m     <= '0;
        best_in    <= '0;
        best_tau   <= '0;
        best_key   <= '0;
      end else if (en) begin
        best_valid <= nx_valid;
        best_m     <= nx_m;
        best_in    <= nx_in;
        best_tau   <= nx_tau;
        best_key   <= nx_key;
      end
    end
  end

endmodule
