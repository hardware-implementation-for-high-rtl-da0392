// qsd_array_adder: parallel adder of two M x K arrays of N-digit QSD numbers.
//
// One qsd_number_adder per array element (M*K of them) works on all elements and all
// digits at once. When add (the ADD signal) is high, both arrays are taken from the
// parallel bus; one clock later the intermediate sum and carry arrays exist, one more
// clock later the result array of M x K numbers with N+1 digits each is on sum and the
// write signal to the output memory is high for one cycle.
//
// Packing: element e (e = row*K + col, an ordering this implementation chose) of an
// array occupies bits [e*N*3 +: N*3] of a/b and [e*(N+1)*3 +: (N+1)*3] of sum, its digit 0
// lowest. Latency 2 clocks from add to write; a new pair of arrays may follow each cycle.
module qsd_array_adder
  import qsd_pkg::*;
#(
  parameter int unsigned M = 10,  // rows
  parameter int unsigned K = 2,   // columns
  parameter int unsigned N = 16   // QSD digits per number
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          add,    // ADD signal: a and b are valid
  input  logic [M*K*N*DIGIT_W-1:0]      a,      // first array
  input  logic [M*K*N*DIGIT_W-1:0]      b,      // second array
  output logic                          write,  // write signal: sum is valid
  output logic [M*K*(N+1)*DIGIT_W-1:0]  sum     // result array
);

  localparam int unsigned ELEMS = M * K;
  localparam int unsigned IN_W  = N * DIGIT_W;
  localparam int unsigned OUT_W = (N + 1) * DIGIT_W;

  logic [ELEMS-1:0] out_valid;

  for (genvar e = 0; e < ELEMS; e++) begin : g_elem
    logic               mid_unused;
    qsd_digit_t [N-1:0] s_unused, c_unused;
    qsd_digit_t [N:0]   z;

    qsd_number_adder #(.N(N)) u_add (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (add),
      .x         (a[e*IN_W +: IN_W]),
      .y         (b[e*IN_W +: IN_W]),
      .mid_valid (mid_unused),
      .s_q       (s_unused),
      .c_q       (c_unused),
      .out_valid (out_valid[e]),
      .z         (z)
    );
    assign sum[e*OUT_W +: OUT_W] = z;
  end

  // All elements run in lock step; the write signal is raised when every one has its sum.
  assign write = &out_valid;

endmodule
