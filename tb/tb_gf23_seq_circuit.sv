// tb_gf23_seq_circuit -- end-to-end test of the GF(2^3) example machine at
// its only size. A reference model holds the state transition table
// (states S0,S1,S2,S3,S6; inputs e0..e3) and the goal states S2, S6. The
// test feeds random input symbols, mostly e0..e3 and sometimes e4..e7, and
// checks after every clock the state digits (S0=000, S1=001, S2=010,
// S3=100, S6=011) and the output Z. It resets the machine again part way
// through. It counts how often each transition of the table, each left-open
// case (S3 on e0, S6 on e2, symbols e4..e7, all taken to S0), the goal
// output and the reset were exercised, and fails if any never was.
module tb_gf23_seq_circuit;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [2:0] in_code;
  logic       z;
  logic [2:0] state;
  int checks = 0;
  int failures = 0;

  gf23_seq_circuit dut (.clk, .rst_n, .in_code_i(in_code), .z_o(z), .state_o(state));

  // Digit code of element e_i.
  localparam logic [2:0] CODE [8] = '{3'b000, 3'b001, 3'b010, 3'b100,
                                      3'b110, 3'b101, 3'b011, 3'b111};
  // Next state (element index) for present state S_s and input e_j,
  // j = 0..3; -1 marks a transition the table leaves open.
  localparam int NEXT [8][4] = '{
    '{ 2,  1,  0,  3},   // S0
    '{ 1,  2,  6,  0},   // S1
    '{ 1,  2,  6,  0},   // S2
    '{-1,  1,  0,  3},   // S3
    '{-1, -1, -1, -1},
    '{-1, -1, -1, -1},
    '{ 2,  1, -1,  3},   // S6
    '{-1, -1, -1, -1}};

  int edge_cnt [8][4];
  int open_cnt;
  int other_sym_cnt;
  int goal_cnt;
  int reset_cnt;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state(input int s);
    checks++;
    if (state !== CODE[s]) begin
      failures++;
      $display("FAIL state %b, expected S%0d (%b)", state, s, CODE[s]);
    end
    checks++;
    if (z !== (s == 2 || s == 6)) begin
      failures++;
      $display("FAIL Z=%b in S%0d", z, s);
    end
    if (s == 2 || s == 6) goal_cnt++;
  endtask

  initial begin
    int s, j, ns;
    foreach (edge_cnt[a, b]) edge_cnt[a][b] = 0;
    open_cnt = 0;
    other_sym_cnt = 0;
    goal_cnt = 0;
    reset_cnt = 0;
    in_code = 3'b000;
    repeat (2) @(posedge clk);
    #1;
    s = 0;
    check_state(s);
    reset_cnt++;
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (n == 2000) begin
        // Asynchronous reset in the middle of the run: back to S0.
        rst_n = 1'b0;
        #1;
        s = 0;
        check_state(s);
        reset_cnt++;
        @(negedge clk);
        rst_n = 1'b1;
      end
      j = ($urandom % 8 == 0) ? 4 + int'($urandom % 4) : int'($urandom % 4);
      in_code = CODE[j];
      if (j >= 4) begin
        ns = 0;
        other_sym_cnt++;
      end else if (NEXT[s][j] < 0) begin
        ns = 0;
        open_cnt++;
      end else begin
        ns = NEXT[s][j];
        edge_cnt[s][j]++;
      end
      #4;
      // The output is a Moore output: no change before the clock edge.
      check_state(s);
      @(posedge clk);
      #1;
      s = ns;
      check_state(s);
    end
    foreach (NEXT[a, b])
      if (NEXT[a][b] >= 0) begin
        checks++;
        if (edge_cnt[a][b] == 0) begin
          failures++;
          $display("FAIL transition S%0d --e%0d--> S%0d never exercised", a, b, NEXT[a][b]);
        end
      end
    checks += 4;
    if (open_cnt == 0)      begin failures++; $display("FAIL no open transition exercised"); end
    if (other_sym_cnt == 0) begin failures++; $display("FAIL no symbol e4..e7 exercised"); end
    if (goal_cnt == 0)      begin failures++; $display("FAIL goal output never seen"); end
    if (reset_cnt < 2)      begin failures++; $display("FAIL reset not exercised"); end
    $display("coverage: open=%0d e4..e7=%0d goal=%0d resets=%0d", open_cnt, other_sym_cnt,
             goal_cnt, reset_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
