// decbp_gateway: the DEC-BPn multicast scheduler as a memory-mapped
// accelerator, the form in which it sits next to a host that runs the switch
// datapath (MC-VOQ queues, packet forwarding, re-enqueueing).
//
// Each timeslot the host writes the queue lengths of all inputs into the
// register file (decbp_regif), writes 0x1 to the control register, waits
// until control reads 0x2 (or ctrl_irq rises), reads the result register
// and then forwards and re-enqueues packets itself. decbp_core computes the
// decision; see decbp_core for the algorithm and its fixed latency
// (355 clock cycles for the default 4 x 4 switch with 3 BP iterations).
//
// Ports: the register bus of decbp_regif. For the default configuration the
// address space is 32 registers: 30 length registers, control at 30,
// result at 31.
module decbp_gateway #(
  parameter int unsigned N      = decbp_pkg::N_IN_DEF,
  parameter int unsigned M      = decbp_pkg::M_OUT_DEF,
  parameter int unsigned LEN_W  = decbp_pkg::LEN_W_DEF,
  parameter int unsigned N_ITER = decbp_pkg::N_ITER_DEF,
  parameter int unsigned AW     = $clog2((N * ((1 << M) - 1) + 1) / 2 + 1 + (2 * N * M + 31) / 32)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic          rd_en,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wr_data,
  output logic [31:0]   rd_data,
  output logic          rd_valid,
  output logic          ctrl_irq
);
  logic [LEN_W-1:0]      y     [N][1<<M];
  logic                  start, busy, done;
  logic [M-1:0]          sigma [N];
  logic [M-1:0]          tau   [N];

  decbp_regif #(.N(N), .M(M), .LEN_W(LEN_W), .AW(AW)) u_regif (
    .clk, .rst_n, .wr_en, .rd_en, .addr, .wr_data, .rd_data, .rd_valid, .ctrl_irq,
    .y, .start, .done, .sigma, .tau
  );

  decbp_core #(.N(N), .M(M), .LEN_W(LEN_W), .N_ITER(N_ITER)) u_core (
    .clk, .rst_n, .start, .y, .busy, .done, .sigma, .tau,
    // per-round trace is for monitoring only and is not mapped to a register
    .dec_valid(), .dec_in(), .dec_tau(), .dec_sigma(), .dec_m()
  );

  // the register file only starts an idle scheduler
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
