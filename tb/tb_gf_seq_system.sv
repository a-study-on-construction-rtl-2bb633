// tb_gf_seq_system -- checks the generic GF(2^3) sequential system with
// random T-gate inputs and a different random control code per T-gate:
// after each clock, state digit V_k must equal input I_j of T-gate V_k for
// the element e_j coded on that gate's control pins, and the decoder lines
// must be one-hot at the element whose code the state digits form.
module tb_gf_seq_system;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [2:0][7:0] tin;
  logic [2:0][2:0] a;
  logic [2:0]      v;
  logic [7:0]      z;
  int checks = 0;
  int failures = 0;

  localparam int IDX [8] = '{0, 1, 2, 6, 3, 5, 4, 7};

  gf_seq_system #(.M(3)) dut (.clk, .rst_n, .tin_i(tin), .a_i(a), .v_o(v), .z_o(z));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] expv;
    tin = '0;
    a   = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (v !== 3'b000 || z !== 8'b0000_0001) begin
      failures++;
      $display("FAIL reset: v=%b z=%b", v, z);
    end
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        tin[k] = 8'($urandom);
        a[k]   = 3'($urandom);
        expv[k] = tin[k][IDX[a[k]]];
      end
      @(posedge clk);
      #1;
      checks++;
      if (v !== expv) begin
        failures++;
        $display("FAIL v=%b expected %b", v, expv);
      end
      checks++;
      if (z !== (8'b1 << IDX[expv])) begin
        failures++;
        $display("FAIL decoder lines %b for state %b", z, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
