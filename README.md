# Sequential circuits over GF(2^m) built from T-gates

This RTL realises a Moore state machine whose states and input symbols are
elements of the finite field GF(2^3), using a construction that needs no
hand-derived flip-flop excitation logic. Every state and every input symbol is
given an m-digit code by a fixed rule. Each state digit is produced by one
**T-gate**: a 2^m-input selector that is steered by the code of the present
input symbol, followed by a one-clock delay. A **decoder** turns the state
digits back into one line per state. The selector inputs are mod-2 sums
(EX-OR gates) of those state lines. For a machine with m state digits the
whole circuit is m T-gates, one decoder and a few EX-OR gates. The example
machine uses 3 T-gates and 1 decoder.

## Digit codes of the field elements

The elements e_0 .. e_{2^m-1} are coded by "level", the number of ones in
the code:

| level | elements | codes, in order |
|---|---|---|
| 0 | e_0 | all zeros |
| 1 | next m | single one, moving up from the LSD: 0..001, 0..010, ... |
| 2 .. m-1 | next ones, level by level | codes of that level in falling value (starting from the MSD) |
| m | e_{2^m-1} | all ones |

For GF(2^3) this gives:

| element | e0 | e1 | e2 | e3 | e4 | e5 | e6 | e7 |
|---|---|---|---|---|---|---|---|---|
| code a2 a1 a0 | 000 | 001 | 010 | 100 | 110 | 101 | 011 | 111 |

`gf_pkg::elem_code(m, i)` computes the code of element e_i at elaboration
time. `gf_digit_code` turns it into a constant lookup table. Only the binary
case (P = 2, one bit per digit) is implemented. The general rule for P-valued
digits is not specified precisely enough to implement. The falling-value order
for levels 2..m-1 is this design's reading of "from the MSD". It is confirmed
only for e6 = 011. The code of e4 and e5 rests on that reading.

## The T-gate and why it implements a next-state function

`gf_tgate` has inputs I_0 .. I_{2^m-1}, one per field element, and an m-digit
control code. It forwards input I_j, where e_j is the element whose code is
on the control pins. Note that I_j is chosen by element, not by the binary
value of the code: with control 100 it forwards I_3, because e3 = 100. The
chosen value is registered ("d" in the block diagram) and appears one clock
later.

For a state machine, write the next value of state digit V_k as

    V_k(t+1) = sum over input symbols j of  [ sum of states S_i that go, on
               input e_j, to a state whose digit k is 1 ] * I_j

Wire each bracketed sum to input I_j of T-gate V_k, and the input symbol's
code to its control pins. The T-gate's multiply-and-sum then reduces to
selection. Because the state lines are one-hot, a mod-2 sum of them is 1
exactly when the present state is one of the summed states.

## The example machine (`gf23_seq_circuit`, the top)

States S0, S1, S2, S3 and S6 use the codes of e0, e1, e2, e3 and e6. Input
symbols are e0..e3. S0 is the start state and S2, S6 are the goal states.

| present | e0 | e1 | e2 | e3 |
|---|---|---|---|---|
| S0 (000) | S2 | S1 | S0 | S3 |
| S1 (001) | S1 | S2 | S6 | S0 |
| S2 (010) | S1 | S2 | S6 | S0 |
| S3 (100) | (open) | S1 | S0 | S3 |
| S6 (011) | S2 | S1 | (open) | S3 |

Grouping the transitions by target state and digit gives:

    V2(t+1) = (S0+S3+S6)·e3
    V1(t+1) = (S0+S6)·e0 + (S1+S2)·e1 + (S1+S2)·e2
    V0(t+1) = (S1+S2)·e0 + (S0+S3+S6)·e1 + (S1+S2)·e2
    Z       = S2 + S6

So T-gate V2 has (S0+S3+S6) on I_3. T-gate V1 has (S0+S6) on I_0 and (S1+S2)
on I_1 and I_2. T-gate V0 has (S1+S2) on I_0 and I_2, and (S0+S3+S6) on I_1.
All other T-gate inputs are tied to 0. The four sums come from EX-OR gates
fed by decoder lines Z_0, Z_1, Z_2, Z_3 and Z_6.

Behaviour that the specification leaves open and this RTL fixes:

- The cells marked *open* go to S0, because the selected T-gate inputs are 0.
- Input symbols e4..e7 also go to S0 from any state.
- The unused codes 110, 101 and 111 all lead to S0 on the next clock.
- Reset is asynchronous and active low. It clears all T-gate registers, which
  is state S0.

Ports: `clk`, `rst_n`, `in_code_i[2:0]` (code of the input symbol),
`z_o` (Moore output), `state_o[2:0]` (state digits V2 V1 V0).

Timing: one symbol per clock. The state changes on the rising edge after the
symbol is applied. `z_o` depends only on the present state.

## Module hierarchy

    gf23_seq_circuit            example machine (top)
    ├── gf_modp_sum  x4         EX-OR sums: S0+S3+S6, S0+S6, S1+S2, output S2+S6
    └── gf_seq_system           generic core: m T-gates + decoder
        ├── gf_tgate  x m       selector + one-clock delay, one per state digit
        │   └── gf_digit_code   constant code table
        └── gf_decoder          state digits -> one-hot state lines
            └── gf_digit_code
    gf_pkg                      P, M, elem_code()

`gf_seq_system` (parameter `M`) is the reusable part. To build another
machine over GF(2^M), derive the sums for each T-gate input as above and
drive `tin_i[k][j]`. Each T-gate has its own control port `a_i[k]`.
Normally all of them are tied to the input symbol's code.

## Verification

Each module has a self-checking testbench in `tb/`:

| testbench | what it checks |
|---|---|
| `tb_gf_digit_code` | codes for M=3 and M=4 against hand-made tables; M=4 codes are one-to-one |
| `tb_gf_decoder` | every code lights exactly the line of its element |
| `tb_gf_modp_sum` | 2- and 3-input sums, all input combinations |
| `tb_gf_tgate` | reset value; 500 random cycles with 1-bit and 3-bit inputs; output changes only on the clock edge |
| `tb_gf_seq_system` | 500 random cycles with a different control code per T-gate; state digits and decoder lines |
| `tb_gf23_seq_circuit` | 4000 random symbols (about 1 in 8 from e4..e7) and a mid-run reset, against a transition-table model |

`tb_gf23_seq_circuit` checks the state and Z before and after every edge. It
fails if any of the following never occurs:

- any table transition;
- an open case;
- an out-of-alphabet symbol;
- the goal output;
- the reset.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/gf_pkg.sv rtl/*.sv \
        tb/tb_gf23_seq_circuit.sv --top-module tb_gf23_seq_circuit
    ./obj_dir/Vtb_gf23_seq_circuit

## Departures and limits

- Only P = 2 is implemented. Digits are bits and sums are EX-OR.
  `gf_tgate` has a width parameter `W` so that it can also pass whole field
  elements (W = M). The sequential circuits use W = 1.
- The T-gate's delay is a clocked register with a reset. The specification
  only calls it a delay element.
- The decoder maps line Z_i to the code of element e_i. With this mapping the
  output function uses lines Z_2 and Z_6.
- The generic core leaves forming the T-gate input sums to its user. No
  module derives them from a transition table automatically.
