// qsd_pkg: shared types and helpers for the quaternary signed-digit (QSD) array adder.
//
// A QSD digit takes one of the seven values -3..3. In hardware each digit is a 3-bit
// sign-magnitude code {sign, magnitude[1:0]}: 3 = 011, 1 = 001, 0 = 000, -1 = 101,
// -3 = 111 (the coding of the design). The code 100 ("negative zero") is never produced
// by the adder; as an input it is read as 0 (a choice of this implementation).
//
// The numbers are packed least significant digit first: digit i of a number sits in
// bits [3*i+2 : 3*i]. Numbers of an array are packed the same way, number 0 at the
// bottom. The helpers convert between the code and a small two's-complement integer;
// they are pure combinational functions and synthesize to a few gates.
package qsd_pkg;

  typedef struct packed {
    logic       sign;  // 1 = negative
    logic [1:0] mag;   // magnitude 0..3
  } qsd_digit_t;

  localparam int unsigned DIGIT_W = $bits(qsd_digit_t);  // 3 bits per digit

  // Two's-complement value of a digit, range -3..3.
  function automatic logic signed [3:0] qsd_to_int(qsd_digit_t d);
    logic signed [3:0] m;
    m = signed'({2'b00, d.mag});
    return d.sign ? -m : m;
  endfunction

  // Code of a value in -3..3 (0 always coded as 000).
  function automatic qsd_digit_t qsd_from_int(logic signed [3:0] v);
    qsd_digit_t d;
    d.sign = v[3];
    d.mag  = v[3] ? 2'(-v) : v[1:0];
    return d;
  endfunction

endpackage
