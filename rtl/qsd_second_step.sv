// qsd_second_step: step 2 of the two-step QSD addition, one digit position.
//
// Adds the intermediate sum s_i (-2..2) of this position and the intermediate carry
// c_{i-1} (-1..1) coming from the position below into the final digit
// z_i = s_i + c_{i-1}, which always lies in -3..3, so no carry leaves this step.
// This matches the second-step table of the method. Digits are in the 3-bit
// sign-magnitude code of qsd_pkg. Purely combinational.
module qsd_second_step
  import qsd_pkg::*;
(
  input  qsd_digit_t s,     // intermediate sum s_i
  input  qsd_digit_t c_in,  // intermediate carry c_{i-1} from the next lower digit
  output qsd_digit_t z      // final sum digit z_i
);

  logic signed [3:0] t;

  always_comb begin
    t = qsd_to_int(s) + qsd_to_int(c_in);
    z = qsd_from_int(t);
  end

endmodule
