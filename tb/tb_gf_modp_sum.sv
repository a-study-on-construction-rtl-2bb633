// tb_gf_modp_sum -- exhaustive check of the 2- and 3-input mod-2 sums
// against an arithmetic count of ones modulo 2.
module tb_gf_modp_sum;

  logic [1:0] d2;
  logic [2:0] d3;
  logic       s2, s3;
  int checks = 0;
  int failures = 0;

  gf_modp_sum #(.N(2)) dut2 (.d_i(d2), .s_o(s2));
  gf_modp_sum #(.N(3)) dut3 (.d_i(d3), .s_o(s3));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int ones;
      d3 = 3'(i);
      d2 = 2'(i);
      #1;
      ones = (i & 1) + ((i >> 1) & 1) + ((i >> 2) & 1);
      checks++;
      if (s3 !== 1'(ones % 2)) begin
        failures++;
        $display("FAIL N=3 %b -> %b", d3, s3);
      end
      ones = (i & 1) + ((i >> 1) & 1);
      checks++;
      if (s2 !== 1'(ones % 2)) begin
        failures++;
        $display("FAIL N=2 %b -> %b", d2, s2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
