// tb_gf_digit_code -- checks the digit-code assignment for GF(2^3) and
// GF(2^4) against tables worked out by hand from the level-ordering rule
// (GF(2^3): e0..e7 = 000,001,010,100,110,101,011,111), and checks that the
// GF(2^4) codes are a one-to-one assignment.
module tb_gf_digit_code;

  logic [2:0] e3, c3;
  logic [3:0] e4, c4;
  int checks = 0;
  int failures = 0;

  gf_digit_code #(.M(3)) dut3 (.elem_i(e3), .code_o(c3));
  gf_digit_code #(.M(4)) dut4 (.elem_i(e4), .code_o(c4));

  localparam logic [2:0] EXP3 [8] = '{3'b000, 3'b001, 3'b010, 3'b100,
                                      3'b110, 3'b101, 3'b011, 3'b111};
  localparam logic [3:0] EXP4 [16] = '{4'b0000,
                                       4'b0001, 4'b0010, 4'b0100, 4'b1000,
                                       4'b1100, 4'b1010, 4'b1001, 4'b0110, 4'b0101, 4'b0011,
                                       4'b1110, 4'b1101, 4'b1011, 4'b0111,
                                       4'b1111};

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seen;
    for (int i = 0; i < 8; i++) begin
      e3 = 3'(i);
      #1;
      checks++;
      if (c3 !== EXP3[i]) begin
        failures++;
        $display("FAIL M=3 e%0d: code %b, expected %b", i, c3, EXP3[i]);
      end
    end
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      e4 = 4'(i);
      #1;
      checks++;
      if (c4 !== EXP4[i]) begin
        failures++;
        $display("FAIL M=4 e%0d: code %b, expected %b", i, c4, EXP4[i]);
      end
      seen[c4] = 1'b1;
    end
    checks++;
    if (seen !== 16'hffff) begin
      failures++;
      $display("FAIL M=4 codes not one-to-one: %h", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
