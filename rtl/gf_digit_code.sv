// gf_digit_code -- digit-code assignment for the elements of GF(2^M).
//
// Given the index i of a field element e_i, returns its M-digit code
// a_{M-1}..a_0 as defined by gf_pkg::elem_code (level ordering: all-zero
// code for e_0, single-one codes from the LSD up, higher levels from the
// MSD down, all-ones code for e_{2^M-1}). The 2^M codes are computed at
// elaboration into a constant table, so the block is a small ROM.
//
// Interface: elem_i (element index, M bits) -> code_o (digit code, M bits).
// Timing: purely combinational. The T-gate and the decoder instantiate it
// with constant indices to know which code belongs to which element.
module gf_digit_code #(
  parameter int unsigned M = gf_pkg::M
) (
  input  logic [M-1:0] elem_i,
  output logic [M-1:0] code_o
);

  localparam int unsigned Q = 1 << M;

  logic [M-1:0] code_table [Q];

  for (genvar i = 0; i < Q; i++) begin : g_table
    assign code_table[i] = M'(gf_pkg::elem_code(M, i));
  end

  assign code_o = code_table[elem_i];

endmodule
