// gf_decoder -- the decoder D of the sequential system.
//
// Turns the M state digits V_{M-1}..V_0 into 2^M state lines: line Z_i is
// 1 exactly when the digits equal the digit code of element e_i
// (gf_digit_code), so the present state S_i is available as a one-hot
// signal for the next-state and output functions. With the example codes
// S2=010 drives Z_2, S6=011 drives Z_6 and S3=100 drives Z_3.
//
// The block's role (m digit lines in, P^m element lines out) is published;
// the index-by-element rule is this design's reading, chosen because it
// makes the printed output function Z = S2 + S6 use lines Z_2 and Z_6.
//
// Interface: v_i (state digits, MSD first) -> z_o (one-hot state lines).
// Timing: purely combinational.
module gf_decoder #(
  parameter int unsigned M = gf_pkg::M
) (
  input  logic [M-1:0]      v_i,
  output logic [(1<<M)-1:0] z_o
);

  localparam int unsigned Q = 1 << M;

  for (genvar i = 0; i < Q; i++) begin : g_line
    logic [M-1:0] code;
    gf_digit_code #(.M(M)) u_code (
      .elem_i (M'(i)),
      .code_o (code)
    );
    assign z_o[i] = (v_i == code);
  end

  // The codes are one-to-one, so exactly one state line is high.
  always_comb assert ($onehot(z_o)) else $error("decoder lines not one-hot: %b", z_o);

endmodule
