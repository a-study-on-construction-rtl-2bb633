// gf_tgate -- the T-gate, the building block of the sequential circuits.
//
// A T-gate has one input I_j for every element e_j of GF(2^M) and an
// M-digit control code a_{M-1}..a_0. It passes to its output the input
// whose element has the control code as its digit code (gf_digit_code),
// so with the current input symbol on the control pins it selects the
// term of a next-state function that belongs to that symbol. The output
// goes through the delay element d, here a register clocked by clk, so the
// selected value appears one clock later and is held for a full cycle;
// this delay is what stores the state digit in a sequential system.
//
// The selection rule and the output delay are from the published block
// diagram; realising d as a positive-edge register with an asynchronous
// active-low reset to 0 (the all-zero state digit) is this design's choice.
// W is the width of each input: 1 for a binary state digit (the default,
// as used by the sequential circuits), M to pass whole field elements.
//
// Interface: in_i[j] is input I_j, a_i the control code, z_o the output.
// Timing: z_o <= in_i[j] with code(e_j) == a_i at each rising clk edge.
module gf_tgate #(
  parameter int unsigned M = gf_pkg::M,
  parameter int unsigned W = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [(1<<M)-1:0][W-1:0] in_i,
  input  logic [M-1:0]          a_i,
  output logic [W-1:0]          z_o
);

  localparam int unsigned Q = 1 << M;

  logic [M-1:0] code [Q];
  logic [W-1:0] sel;

  for (genvar j = 0; j < Q; j++) begin : g_code
    gf_digit_code #(.M(M)) u_code (
      .elem_i (M'(j)),
      .code_o (code[j])
    );
  end

  // The codes are a one-to-one assignment, so exactly one input matches.
  always_comb begin
    sel = '0;
    for (int j = 0; j < Q; j++)
      if (code[j] == a_i) sel = in_i[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) z_o <= '0;
    else        z_o <= sel;
  end

endmodule
