// tb_qsd_first_step: exhaustive check of the QSD first-step cell.
//
// Drives all 7 x 7 digit pairs and compares the sum and carry with the first-step
// table, worked out here from the rule "carry +1 when x+y >= 3, -1 when x+y <= -3",
// using a sign-magnitude encoder of its own. Also feeds the unused code 100 and expects
// it to behave as 0. Purely combinational, so a time step stands for a clock.
module tb_qsd_first_step;
  import qsd_pkg::*;

  qsd_digit_t x, y, s, c;
  int checks = 0, failures = 0;

  qsd_first_step dut (.x(x), .y(y), .s(s), .c(c));

  function automatic logic [2:0] enc(int v);
    return (v < 0) ? {1'b1, 2'(-v)} : {1'b0, 2'(v)};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int es, ec;
    for (int a = -3; a <= 3; a++) begin
      for (int b = -3; b <= 3; b++) begin
        x = enc(a);
        y = enc(b);
        #1;
        ec = (a + b >= 3) ? 1 : (a + b <= -3) ? -1 : 0;
        es = a + b - 4 * ec;
        checks++;
        if (s !== enc(es) || c !== enc(ec)) begin
          failures++;
          $display("FAIL x=%0d y=%0d: s=%b c=%b, expected s=%0d c=%0d", a, b, s, c, es, ec);
        end
      end
    end
    // negative zero read as zero
    x = 3'b100; y = enc(3); #1;
    checks++;
    if (s !== enc(-1) || c !== enc(1)) begin failures++; $display("FAIL -0 + 3"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
