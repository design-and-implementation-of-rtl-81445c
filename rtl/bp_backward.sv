// bp_backward: backward messages of all outputs (eq. 15).
//
//     b(j->i) = max over inputs i' other than i of f(i'->j)
//
// Purely combinational; the scheduler registers the result at the end of a
// BP iteration. Forward messages are never negative and are zero for inputs
// that have already decided, so those inputs drop out of the maximum. With
// a single input the maximum is empty and b is 0.
// Indexing: f[i][j] is f(i->j), b[i][j] is b(j->i), j an output bit index.
module bp_backward #(
  parameter int unsigned N   = decbp_pkg::N_IN_DEF,
  parameter int unsigned M   = decbp_pkg::M_OUT_DEF,
  parameter int unsigned W_W = decbp_pkg::msg_width(decbp_pkg::LEN_W_DEF, M)
) (
  input  logic signed [W_W-1:0] f [N][M],
  output logic signed [W_W-1:0] b [N][M]
);
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      for (int unsigned j = 0; j < M; j++) begin
        b[i][j] = '0;
        for (int unsigned i2 = 0; i2 < N; i2++)
          if ((i2 != i) && (f[i2][j] > b[i][j])) b[i][j] = f[i2][j];
      end
    end
  end
endmodule
