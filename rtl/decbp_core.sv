// decbp_core: DEC-BPn multicast scheduler for an N x M input-queued switch
// with MC-VOQ queues (one queue per input and non-empty fanout set).
//
// Given the queue lengths y[i][sigma] it returns, for every input i, the
// queue to serve sigma[i] and the outputs the head packet is sent to tau[i]
// (a subset of sigma[i]); the packet is re-enqueued to sigma[i] \ tau[i].
// The decisions are conflict free: no output appears in two tau[i].
//
// Algorithm (decimation with n BP iterations, n = N_ITER):
//   0. max_pressure: w[i][tau] = max over sigma >= tau of
//      y[sigma] - y[sigma \ tau], and the best sigma, for all inputs.
//   Then N decimation rounds, each over the undecided inputs and the still
//   available outputs:
//   1. all backward messages b := 0;
//   2. n times: forward messages (bp_forward, one fanout set per cycle for
//      all inputs in parallel), then backward messages (bp_backward);
//   3. beliefs m[i][tau] = w[i][tau] - sum b, maximised over undecided i and
//      available tau (bp_decision, random tie break);
//   4. the winner i gets tau (or the empty set if the best belief is 0) and
//      its best queue; i and the outputs of tau are removed.
//
// Each loop that feeds back on itself is a state of a small controller;
// everything independent runs in parallel in one cycle. Cycle counts: 3^M
// for step 0, 2^M + 1 per BP iteration, 2^M + 1 for decision and commit.
// done rises at the clock edge LATENCY edges after the one that samples start:
//     LATENCY = 3^M + 2 + N * (N_ITER + 1) * (2^M + 1)
// which is 355 cycles for the 4 x 4, n = 3 default (151 for n = 0). The
// state counts of the original state machine (81 + n*(68 + 53) + 71 = 515
// cycles) are not reproduced; only its 81-state max-pressure phase is.
//
// Interface: start (pulse, ignored while busy). y must hold still for the
// first 3^M + 1 cycles after start. done pulses for one cycle; sigma and tau
// then hold the decision until the next start. dec_* report each round's
// choice in its commit cycle (for monitoring). Reset: synchronous, active low.
module decbp_core
  import decbp_pkg::*;
#(
  parameter int unsigned N      = N_IN_DEF,
  parameter int unsigned M      = M_OUT_DEF,
  parameter int unsigned LEN_W  = LEN_W_DEF,
  parameter int unsigned N_ITER = N_ITER_DEF,
  parameter int unsigned W_W    = msg_width(LEN_W, M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [LEN_W-1:0]        y     [N][1<<M],
  output logic                    busy,
  output logic                    done,
  output logic [M-1:0]            sigma [N],
  output logic [M-1:0]            tau   [N],
  // per-round decision trace
  output logic                    dec_valid,
  output logic [$clog2(N)-1:0]    dec_in,
  output logic [M-1:0]            dec_tau,
  output logic [M-1:0]            dec_sigma,
  output logic signed [W_W-1:0]   dec_m
);
  localparam int unsigned S  = 1 << M;
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned RW = $clog2(N + 1);
  localparam int unsigned TW = (N_ITER > 1) ? $clog2(N_ITER) : 1;

  state_t state, nstate;

  logic [M-1:0]  scan_tau;     // fanout set scanned in FWD / DEC
  logic [TW-1:0] iter;         // BP iteration within the round
  logic [RW-1:0] round;        // decimation round
  logic [N-1:0]  act_in;       // undecided inputs
  logic [M-1:0]  avail_out;    // outputs not yet granted

  // step 0
  logic                  mp_start, mp_busy, mp_done;
  logic signed [W_W-1:0] w    [N][S];
  logic [M-1:0]          shat [N][S];

  // BP messages
  logic signed [W_W-1:0] b_reg [N][M];
  logic signed [W_W-1:0] f     [N][M];
  logic signed [W_W-1:0] b_new [N][M];
  logic signed [W_W-1:0] m     [N];
  logic                  m_valid [N];

  // decision
  logic                  best_valid;
  logic signed [W_W-1:0] best_m;
  logic [IW-1:0]         best_in;
  logic [M-1:0]          best_tau;
  logic                  fwd_clr, dec_clr;
  logic                  last_scan, last_round;
  state_t                after_round;   // FWD or DEC, depending on N_ITER

  assign mp_start    = (state == ST_IDLE) && start;
  assign last_scan   = (scan_tau == M'(S - 1));
  assign last_round  = (round == RW'(N - 1));
  assign after_round = (N_ITER > 0) ? ST_FWD : ST_DEC;

  always_comb begin
    nstate = state;
    unique case (state)
      ST_IDLE:   if (start) nstate = ST_MP;
      ST_MP:     if (mp_done) nstate = after_round;
      ST_FWD:    if (last_scan) nstate = ST_BWD;
      ST_BWD:    nstate = (32'(iter) + 1 < N_ITER) ? ST_FWD : ST_DEC;
      ST_DEC:    if (last_scan) nstate = ST_COMMIT;
      ST_COMMIT: nstate = last_round ? ST_DONE : after_round;
      ST_DONE:   nstate = ST_IDLE;
      default:   nstate = ST_IDLE;
    endcase
  end

  // accumulators are cleared in the cycle before a scan starts
  assign fwd_clr = (nstate == ST_FWD) && (state != ST_FWD);
  assign dec_clr = (nstate == ST_DEC) && (state != ST_DEC);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      scan_tau  <= '0;
      iter      <= '0;
      round     <= '0;
      act_in    <= '0;
      avail_out <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      for (int unsigned i = 0; i < N; i++) begin
        sigma[i] <= '0;
        tau[i]   <= '0;
        for (int unsigned j = 0; j < M; j++) b_reg[i][j] <= '0;
      end
    end else begin
      state <= nstate;
      done  <= 1'b0;
      if (nstate != state) scan_tau <= '0;
      else if ((state == ST_FWD) || (state == ST_DEC)) scan_tau <= scan_tau + 1'b1;
      unique case (state)
        ST_IDLE: if (start) begin
          busy      <= 1'b1;
          round     <= '0;
          act_in    <= '1;
          avail_out <= '1;
          for (int unsigned i = 0; i < N; i++) begin
            sigma[i] <= '0;
            tau[i]   <= '0;
          end
        end
        ST_MP: begin
          iter <= '0;
          for (int unsigned i = 0; i < N; i++)
            for (int unsigned j = 0; j < M; j++) b_reg[i][j] <= '0;
        end
        ST_BWD: begin
          iter  <= iter + 1'b1;
          b_reg <= b_new;
        end
        ST_COMMIT: begin
          if (best_valid && (best_m > 0)) begin
            tau[best_in]   <= best_tau;
            sigma[best_in] <= shat[best_in][best_tau];
            avail_out      <= avail_out & ~best_tau;
          end
          act_in[best_in] <= 1'b0;
          round <= round + 1'b1;
          iter  <= '0;
          for (int unsigned i = 0; i < N; i++)
            for (int unsigned j = 0; j < M; j++) b_reg[i][j] <= '0;
        end
        ST_DONE: begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  // decision trace
  always_comb begin
    dec_valid = (state == ST_COMMIT);
    dec_in    = best_in;
    dec_m     = best_m;
    if (best_valid && (best_m > 0)) begin
      dec_tau   = best_tau;
      dec_sigma = shat[best_in][best_tau];
    end else begin
      dec_tau   = '0;
      dec_sigma = '0;
    end
  end

  max_pressure #(.N(N), .M(M), .LEN_W(LEN_W), .W_W(W_W)) u_mp (
    .clk  (clk),
    .rst_n(rst_n),
    .start(mp_start),
    .y    (y),
    .busy (mp_busy),
    .done (mp_done),
    .w    (w),
    .shat (shat)
  );

  for (genvar i = 0; i < N; i++) begin : g_fwd
    bp_forward #(.M(M), .LEN_W(LEN_W), .W_W(W_W)) u_fwd (
      .clk    (clk),
      .clr    (fwd_clr),
      .en     (state == ST_FWD),
      .tau    (scan_tau),
      .active (act_in[i]),
      .avail  (avail_out),
      .w      (w[i]),
      .b      (b_reg[i]),
      .m      (m[i]),
      .m_valid(m_valid[i]),
      .f      (f[i])
    );
  end

  bp_backward #(.N(N), .M(M), .W_W(W_W)) u_bwd (
    .f(f),
    .b(b_new)
  );

  bp_decision #(.N(N), .M(M), .W_W(W_W)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (dec_clr),
    .en        (state == ST_DEC),
    .tau       (scan_tau),
    .m         (m),
    .m_valid   (m_valid),
    .best_valid(best_valid),
    .best_m    (best_m),
    .best_in   (best_in),
    .best_tau  (best_tau)
  );

  // a decision never grants an output twice
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == ST_COMMIT && best_valid && best_m > 0) |-> ((best_tau & ~avail_out) == '0));
  // step 0 runs exactly while the controller waits for it
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == ST_MP && !mp_done) |-> mp_busy);
  // the chosen queue always covers the transmission set
  assert property (@(posedge clk) disable iff (!rst_n)
                   dec_valid |-> ((dec_tau & ~dec_sigma) == '0));

endmodule
