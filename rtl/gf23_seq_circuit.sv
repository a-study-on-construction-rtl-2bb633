// gf23_seq_circuit -- example Moore machine over GF(2^3) built from
// T-gates, a decoder and EX-OR gates, without flip-flop feedback logic.
//
// The machine has five states S0, S1, S2, S3, S6 (named after the field
// elements whose digit codes they use: 000, 001, 010, 100, 011) and reads
// one input symbol e0..e3 per clock. S0 is the start state; S2 and S6 are
// the goal states, so the output is Z = S2 + S6. Transitions:
//   S0: e0->S2 e1->S1 e2->S0 e3->S3     S1: e0->S1 e1->S2 e2->S6 e3->S0
//   S2: e0->S1 e1->S2 e2->S6 e3->S0     S3:        e1->S1 e2->S0 e3->S3
//   S6: e0->S2 e1->S1        e3->S3
// The next state digits are, per input symbol I_j,
//   V2(t+1) = (S0+S3+S6)*I3
//   V1(t+1) = (S0+S6)*I0 + (S1+S2)*I1 + (S1+S2)*I2
//   V0(t+1) = (S1+S2)*I0 + (S0+S3+S6)*I1 + (S1+S2)*I2
// Each equation is one T-gate of gf_seq_system: the sum of states that
// multiplies I_j drives T-gate input I_j, unused inputs are tied to 0, and
// the input symbol's digit code drives every T-gate's control pins. The
// sums are EX-OR gates (gf_modp_sum) fed by the decoder's state lines.
// All of this follows the published example. Consequences of tying unused
// T-gate inputs to 0, which the example leaves open: S3 on e0, S6 on e2,
// any input symbol e4..e7 and any unused state code all lead to S0.
//
// Interface:
//   in_code_i : digit code a2 a1 a0 of the input symbol (e0=000, e1=001,
//               e2=010, e3=100; e4..e7 = 110, 101, 011, 111)
//   z_o       : Moore output, 1 in the goal states S2 and S6
//   state_o   : present state digits V2 V1 V0
// Timing: one transition per rising clk edge; z_o and state_o depend only
// on the present state. rst_n (asynchronous, active low) enters S0.
// Decoder lines Z4, Z5 and Z7 (codes 110, 101, 111) belong to no state and
// are left unused, which lint reports as unused bits.
module gf23_seq_circuit (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] in_code_i,
  output logic       z_o,
  output logic [2:0] state_o
);

  localparam int unsigned M = 3;
  localparam int unsigned Q = 1 << M;

  logic [M-1:0][Q-1:0] tin;
  logic [M-1:0][M-1:0] ctrl;
  logic [Q-1:0]        s;      // one-hot present state lines, s[i] = S_i
  logic                s036;   // S0 + S3 + S6
  logic                s06;    // S0 + S6
  logic                s12;    // S1 + S2

  gf_modp_sum #(.N(3)) u_sum036 (.d_i({s[0], s[3], s[6]}), .s_o(s036));
  gf_modp_sum #(.N(2)) u_sum06  (.d_i({s[0], s[6]}),       .s_o(s06));
  gf_modp_sum #(.N(2)) u_sum12  (.d_i({s[1], s[2]}),       .s_o(s12));
  gf_modp_sum #(.N(2)) u_out    (.d_i({s[2], s[6]}),       .s_o(z_o));

  always_comb begin
    tin = '0;
    // T-gate V2: V2(t+1) = (S0+S3+S6)*I3
    tin[2][3] = s036;
    // T-gate V1
    tin[1][0] = s06;
    tin[1][1] = s12;
    tin[1][2] = s12;
    // T-gate V0
    tin[0][0] = s12;
    tin[0][1] = s036;
    tin[0][2] = s12;
  end

  assign ctrl = {M{in_code_i}};

  gf_seq_system #(.M(M)) u_core (
    .clk   (clk),
    .rst_n (rst_n),
    .tin_i (tin),
    .a_i   (ctrl),
    .v_o   (state_o),
    .z_o   (s)
  );

endmodule
