// tb_qsd_second_step: exhaustive check of the QSD second-step cell.
//
// Drives every intermediate sum -2..2 with every carry -1..1 and compares the final
// digit with s + c, coded with a sign-magnitude encoder of its own (zero as 000).
module tb_qsd_second_step;
  import qsd_pkg::*;

  qsd_digit_t s, ci, z;
  int checks = 0, failures = 0;

  qsd_second_step dut (.s(s), .c_in(ci), .z(z));

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
    for (int a = -2; a <= 2; a++) begin
      for (int b = -1; b <= 1; b++) begin
        s  = enc(a);
        ci = enc(b);
        #1;
        checks++;
        if (z !== enc(a + b)) begin
          failures++;
          $display("FAIL s=%0d c=%0d: z=%b, expected %0d", a, b, z, a + b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
