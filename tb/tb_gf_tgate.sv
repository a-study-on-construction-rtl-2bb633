// tb_gf_tgate -- checks the T-gate for GF(2^3) with 1-bit inputs and with
// 3-bit (field element) inputs: after reset the output is 0; with random
// inputs and a random control code, the output one clock later equals the
// input I_j of the element e_j whose digit code is on the control pins,
// and it does not change before that clock edge.
module tb_gf_tgate;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0]      in1;
  logic [7:0][2:0] in3;
  logic [2:0]      a;
  logic            z1;
  logic [2:0]      z3;
  int checks = 0;
  int failures = 0;

  // Element index for each code value 0..7 (e0..e7 = 000,001,010,100,
  // 110,101,011,111).
  localparam int IDX [8] = '{0, 1, 2, 6, 3, 5, 4, 7};

  gf_tgate #(.M(3), .W(1)) dut1 (.clk, .rst_n, .in_i(in1), .a_i(a), .z_o(z1));
  gf_tgate #(.M(3), .W(3)) dut3 (.clk, .rst_n, .in_i(in3), .a_i(a), .z_o(z3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       exp1, old1;
    logic [2:0] exp3, old3;
    in1 = 8'hff;
    in3 = '1;
    a   = 3'b000;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (z1 !== 1'b0 || z3 !== 3'b000) begin
      failures++;
      $display("FAIL reset: z1=%b z3=%b", z1, z3);
    end
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in1  = 8'($urandom);
      for (int j = 0; j < 8; j++) in3[j] = 3'($urandom);
      a    = 3'($urandom);
      exp1 = in1[IDX[a]];
      exp3 = in3[IDX[a]];
      old1 = z1;
      old3 = z3;
      #4;  // just before the edge: the delay still holds the old value
      checks++;
      if (z1 !== old1 || z3 !== old3) begin
        failures++;
        $display("FAIL output changed before the clock edge");
      end
      @(posedge clk);
      #1;
      checks++;
      if (z1 !== exp1 || z3 !== exp3) begin
        failures++;
        $display("FAIL a=%b: z1=%b exp %b, z3=%b exp %b", a, z1, exp1, z3, exp3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
