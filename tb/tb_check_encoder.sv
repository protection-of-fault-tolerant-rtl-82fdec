// tb_check_encoder: checks the check-filter inputs of the four-filter bank
// against the three sums written out by hand (x5 = x1+x2+x3,
// x6 = x1+x2+x4, x7 = x1+x3+x4), for random and extreme 8-bit inputs.
module tb_check_encoder;
  localparam int K = 4, IN_W = 8, R = 3, CHK_IN_W = 10;

  logic signed [IN_W-1:0]     x  [K];
  logic signed [CHK_IN_W-1:0] xc [R];
  int checks = 0, failures = 0;

  check_encoder #(.K(K), .IN_W(IN_W)) dut (.x(x), .xc(xc));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int a, input int b, input int c, input int d);
    int e [R];
    x[0] = IN_W'(a); x[1] = IN_W'(b); x[2] = IN_W'(c); x[3] = IN_W'(d);
    e[0] = a + b + c;
    e[1] = a + b + d;
    e[2] = a + c + d;
    #1;
    for (int j = 0; j < R; j++) begin
      checks++;
      if (int'(xc[j]) != e[j]) begin
        failures++;
        $display("FAIL x=%0d %0d %0d %0d: xc[%0d]=%0d expected %0d", a, b, c, d, j, xc[j], e[j]);
      end
    end
  endtask

  initial begin
    apply(-128, -128, -128, -128);
    apply(127, 127, 127, 127);
    apply(1, 2, 4, 8);
    apply(-128, 127, -128, 127);
    for (int n = 0; n < 1000; n++)
      apply($urandom_range(255) - 128, $urandom_range(255) - 128,
            $urandom_range(255) - 128, $urandom_range(255) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
