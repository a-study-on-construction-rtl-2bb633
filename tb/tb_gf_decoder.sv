// tb_gf_decoder -- drives every 3-digit state code into the GF(2^3)
// decoder and checks that exactly the line of the matching element is
// high (S0=000->Z0, S1=001->Z1, S2=010->Z2, S3=100->Z3, 110->Z4,
// 101->Z5, S6=011->Z6, 111->Z7).
module tb_gf_decoder;

  logic [2:0] v;
  logic [7:0] z;
  int checks = 0;
  int failures = 0;

  gf_decoder #(.M(3)) dut (.v_i(v), .z_o(z));

  // Element index for each code value 0..7.
  localparam int IDX [8] = '{0, 1, 2, 6, 3, 5, 4, 7};

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      v = 3'(c);
      #1;
      checks++;
      if (z !== (8'b1 << IDX[c])) begin
        failures++;
        $display("FAIL code %b: lines %b, expected line %0d", v, z, IDX[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
