// gf_seq_system -- generic non-feedback sequential system over GF(2^M).
//
// The general structure: one T-gate per state digit V_k (k = 0..M-1) and a
// decoder D. T-gate V_k receives on its inputs I_0..I_{2^M-1} the terms of
// the next-state function of V_k, one per input symbol, and on its control
// pins the digit code of the present input symbol; its delayed output is
// state digit V_k. The decoder turns the M state digits into one-hot state
// lines Z_0..Z_{2^M-1}, from which the caller forms the next-state terms and
// the Moore output (sums of state lines, see gf_modp_sum).
//
// Structure and port grouping follow the published block diagram; each
// T-gate has its own control code port as drawn, and a caller whose T-gates
// all see the same input symbol ties them together.
//
// Interface:
//   tin_i[k][j] : input I_j of T-gate V_k
//   a_i[k]      : control digit code of T-gate V_k
//   v_o         : state digits V_{M-1}..V_0 (registered)
//   z_o         : decoded state lines (combinational from v_o)
// Timing: v_o updates at each rising clk edge; reset gives the all-zero
// code, i.e. state e_0.
module gf_seq_system #(
  parameter int unsigned M = gf_pkg::M
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [M-1:0][(1<<M)-1:0]      tin_i,
  input  logic [M-1:0][M-1:0]           a_i,
  output logic [M-1:0]                  v_o,
  output logic [(1<<M)-1:0]             z_o
);

  for (genvar k = 0; k < M; k++) begin : g_tgate
    gf_tgate #(.M(M), .W(1)) u_tgate (
      .clk   (clk),
      .rst_n (rst_n),
      .in_i  (tin_i[k]),
      .a_i   (a_i[k]),
      .z_o   (v_o[k])
    );
  end

  gf_decoder #(.M(M)) u_dec (
    .v_i (v_o),
    .z_o (z_o)
  );

endmodule
