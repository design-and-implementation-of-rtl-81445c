// decbp_regif: memory-mapped register file in front of the scheduler.
//
// The host pushes every MC-VOQ queue length, starts the scheduler through a
// control register and reads the decision back, over a plain 32-bit register
// bus. For the 4 x 4 switch the map is:
//   0 .. 29  queue lengths, two 16-bit lengths per register
//   30       control: host writes 0x1 to start; reads 0x1 while the
//            scheduler runs and 0x2 once the decision is ready
//   31       result (read only): input i in bits [8i+7:8i],
//            sigma_i in the upper nibble, tau_i in the lower one
// In general there are N*(2^M - 1) lengths; length q = i*(2^M - 1) + s - 1
// (input i, fanout mask s) sits in register q/2, low half for even q. The
// control register follows the lengths, then ceil(2NM/32) result registers.
// The packing order of lengths and result fields is this design's choice.
//
// Bus timing: a write takes effect at the clock edge where wr_en is high;
// a read returns rd_data with rd_valid one cycle after rd_en. While the
// scheduler runs (control = 0x1) writes to lengths and to control are
// ignored, so the lengths it reads stay stable. ctrl_irq mirrors control
// bit 1 so an interrupt line can be attached to it. Reset: synchronous,
// active low; all lengths, control and result read as zero afterwards.
module decbp_regif #(
  parameter int unsigned N     = decbp_pkg::N_IN_DEF,
  parameter int unsigned M     = decbp_pkg::M_OUT_DEF,
  parameter int unsigned LEN_W = decbp_pkg::LEN_W_DEF,
  parameter int unsigned NQ    = N * ((1 << M) - 1),          // queue lengths
  parameter int unsigned NLREG = (NQ + 1) / 2,                // length registers
  parameter int unsigned NRES  = (2 * N * M + 31) / 32,       // result registers
  parameter int unsigned AW    = $clog2(NLREG + 1 + NRES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // register bus
  input  logic               wr_en,
  input  logic               rd_en,
  input  logic [AW-1:0]      addr,
  input  logic [31:0]        wr_data,
  output logic [31:0]        rd_data,
  output logic               rd_valid,
  output logic               ctrl_irq,
  // scheduler side
  output logic [LEN_W-1:0]   y     [N][1<<M],
  output logic               start,
  input  logic               done,
  input  logic [M-1:0]       sigma [N],
  input  logic [M-1:0]       tau   [N]
);
  localparam int unsigned S        = 1 << M;
  localparam int unsigned CTRL     = NLREG;
  localparam logic [15:0] C_START  = 16'h0001;
  localparam logic [15:0] C_READY  = 16'h0002;

  logic [LEN_W-1:0]   len [NQ];
  logic [15:0]        ctrl;
  logic [32*NRES-1:0] result;
  logic               running;

  assign running  = (ctrl == C_START);
  assign ctrl_irq = ctrl[1];

  always_comb begin
    result = '0;
    for (int unsigned i = 0; i < N; i++)
      result[2*M*i +: 2*M] = {sigma[i], tau[i]};
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      y[i][0] = '0;
      for (int unsigned s = 1; s < S; s++) y[i][s] = len[i*(S-1) + s - 1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned q = 0; q < NQ; q++) len[q] <= '0;
      ctrl     <= '0;
      start    <= 1'b0;
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else begin
      start    <= 1'b0;
      rd_valid <= rd_en;
      if (wr_en && !running) begin
        if (32'(addr) < NLREG) begin
          len[2*addr] <= wr_data[LEN_W-1:0];
          if (2 * 32'(addr) + 1 < NQ) len[2*addr + 1] <= wr_data[16 +: LEN_W];
        end else if (32'(addr) == CTRL) begin
          ctrl <= wr_data[15:0];
          if (wr_data[15:0] == C_START) start <= 1'b1;
        end
      end
      if (done && running) ctrl <= C_READY;
      if (rd_en) begin
        rd_data <= '0;
        if (32'(addr) < NLREG) begin
          rd_data[LEN_W-1:0] <= len[2*addr];
          if (2 * 32'(addr) + 1 < NQ) rd_data[16 +: LEN_W] <= len[2*addr + 1];
        end else if (32'(addr) == CTRL) begin
          rd_data[15:0] <= ctrl;
        end else if (32'(addr) < CTRL + 1 + NRES) begin
          rd_data <= result[32*(32'(addr) - CTRL - 1) +: 32];
        end
      end
    end
  end

  // the lengths use at most 16 bits of each half register
  initial assert (LEN_W <= 16) else $error("LEN_W must fit a 16-bit register half");

endmodule
