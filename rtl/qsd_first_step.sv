// qsd_first_step: step 1 of the two-step QSD addition, one digit position.
//
// Adds the addend and augend digits x_i and y_i (each -3..3) and splits the total
// t = x_i + y_i (-6..6) into an intermediate carry c_i and sum s_i with t = 4*c_i + s_i:
//   t >= 3       : c_i = +1, s_i = t - 4   (s_i in -1..2)
//   -2 <= t <= 2 : c_i =  0, s_i = t
//   t <= -3      : c_i = -1, s_i = t + 4   (s_i in -2..1)
// This is exactly the first-step table of the method: s_i stays in -2..2 and c_i in
// -1..1, so the second step can never overflow a digit. Digits are in the 3-bit
// sign-magnitude code of qsd_pkg. Purely combinational; the array adder registers it.
module qsd_first_step
  import qsd_pkg::*;
(
  input  qsd_digit_t x,  // addend digit x_i
  input  qsd_digit_t y,  // augend digit y_i
  output qsd_digit_t s,  // intermediate sum s_i, -2..2
  output qsd_digit_t c   // intermediate carry c_i, -1..1
);

  logic signed [3:0] t;

  always_comb begin
    t = qsd_to_int(x) + qsd_to_int(y);
    if (t >= 4'sd3) begin
      c = qsd_from_int(4'sd1);
      s = qsd_from_int(t - 4'sd4);
    end else if (t <= -4'sd3) begin
      c = qsd_from_int(-4'sd1);
      s = qsd_from_int(t + 4'sd4);
    end else begin
      c = qsd_from_int(4'sd0);
      s = qsd_from_int(t);
    end
  end

endmodule
