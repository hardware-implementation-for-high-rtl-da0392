// qsd_number_adder: two-step parallel adder for two N-digit QSD numbers.
//
// Every digit position has its own first-step cell; all N positions work at once, so the
// carry never ripples further than one digit. The first-step results (intermediate sums
// s and carries c) are registered at the end of the first clock period. In the second
// period every position adds its own s_i and the carry c_{i-1} of the position below
// (0 for the lowest digit); the (N+1)-digit result is registered at the end of that
// period. The extra top digit z_N is the carry c_{N-1} of the highest position.
//
// Timing: x/y sampled with in_valid at edge k; s_q/c_q and mid_valid valid after edge k,
// z and out_valid valid after edge k+1 (two clock periods, fully pipelined: a new pair
// may enter every cycle). Only the valid flags are reset.
// The digit cells, the zero carry into the lowest digit and the extra top digit follow
// the two-step method; the register after each step follows its one-clock-per-step
// timing; the valid flags are this implementation's handshake.
module qsd_number_adder
  import qsd_pkg::*;
#(
  parameter int unsigned N = 16  // QSD digits per operand
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,   // x and y hold a pair to add
  input  qsd_digit_t [N-1:0]   x,          // addend, digit 0 least significant
  input  qsd_digit_t [N-1:0]   y,          // augend
  output logic                 mid_valid,  // s_q/c_q hold first-step results
  output qsd_digit_t [N-1:0]   s_q,        // registered intermediate sums
  output qsd_digit_t [N-1:0]   c_q,        // registered intermediate carries
  output logic                 out_valid,  // z holds a sum
  output qsd_digit_t [N:0]     z           // registered (N+1)-digit sum
);

  qsd_digit_t [N-1:0] s_d, c_d;
  qsd_digit_t [N:0]   z_d;

  for (genvar i = 0; i < N; i++) begin : g_digit
    qsd_first_step u_fs (
      .x (x[i]),
      .y (y[i]),
      .s (s_d[i]),
      .c (c_d[i])
    );
    qsd_second_step u_ss (
      .s    (s_q[i]),
      .c_in ((i == 0) ? qsd_digit_t'('0) : c_q[(i == 0) ? 0 : i-1]),
      .z    (z_d[i])
    );
  end
  assign z_d[N] = c_q[N-1];

  always_ff @(posedge clk) begin
    s_q <= s_d;
    c_q <= c_d;
    z   <= z_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mid_valid <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      mid_valid <= in_valid;
      out_valid <= mid_valid;
    end
  end

endmodule
