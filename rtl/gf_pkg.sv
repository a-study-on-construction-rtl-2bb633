// gf_pkg -- shared constants and the digit-code assignment for GF(P^M).
//
// The field elements e_0 .. e_{P^M-1} are given M-digit codes
// a_{M-1}..a_0 (MSD first) by a level-ordered assignment: the level of a
// code is its number of non-zero digits.
//   level 0      : e_0 gets the all-zero code.
//   level 1      : the next M elements get the single-one codes, filled from
//                  the least significant digit upwards (0..01, 0..10, ...).
//   levels 2..M-1: filled the same way level by level, but starting from the
//                  most significant digit, i.e. in falling code value
//                  (for M=3: 110, 101, 011).
//   level M      : e_{P^M-1} gets the all-ones code.
// For GF(2^3) this gives e0..e7 = 000,001,010,100,110,101,011,111, which
// matches the state codes S0=000, S1=001, S2=010, S3=100 and S6=011 used by
// the example machine. The ordering follows the published algorithm; only
// the binary case P=2 is implemented (a digit is one bit), the general-P
// ordering of levels 2..M-1 being this design's reading of it.
package gf_pkg;

  // Characteristic and extension degree of the example field GF(2^3).
  localparam int unsigned P = 2;
  localparam int unsigned M = 3;

  // Number of ones in a code word.
  function automatic int unsigned popcount(input int unsigned v);
    int unsigned n;
    n = 0;
    for (int b = 0; b < 32; b++) n += (v >> b) & 1;
    return n;
  endfunction

  // Digit code of element e_idx in GF(2^m), per the level ordering above.
  function automatic int unsigned elem_code(input int unsigned m, input int unsigned idx);
    int unsigned q;
    int unsigned n;
    int unsigned v;
    int unsigned code;
    q    = 1 << m;
    n    = 1;
    code = 0;
    if (idx == q - 1) code = q - 1;
    else if (idx != 0) begin
      for (int unsigned lvl = 1; lvl < m; lvl++) begin
        for (int unsigned k = 0; k < q; k++) begin
          v = (lvl == 1) ? k : q - 1 - k;
          if (popcount(v) == lvl) begin
            if (n == idx) code = v;
            n++;
          end
        end
      end
    end
    return code;
  endfunction

endpackage
