// gf_modp_sum -- the mod-P sum of N digits, for P = 2 an N-input EX-OR.
//
// The state functions and next-state functions of the circuits are sums
// of one-hot state lines, e.g. (S0 + S3 + S6). Over GF(2) the sum is the
// mod-2 sum, realised as an EX-OR gate as published. Because at most one
// state line is high at a time, the result is 1 when the present state is
// any of the summed states.
//
// Interface: d_i (N digits) -> s_o (their mod-2 sum). Combinational.
module gf_modp_sum #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] d_i,
  output logic         s_o
);

  assign s_o = ^d_i;

endmodule
