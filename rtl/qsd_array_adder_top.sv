// qsd_array_adder_top: QSD 2D-array adder chip.
//
// Adds two M x K arrays of N-digit quaternary signed-digit (QSD) numbers. Three parts
// are chained by wide parallel buses:
//   1. qsd_input_memory  - the outside writes both arrays, one BUS_W-bit word per clock
//                          (IN_WORDS words: array A first, then array B);
//   2. qsd_array_adder   - on the ADD signal every digit of every number is added at once
//                          with the two-step carry-free method;
//   3. qsd_output_memory - the write signal stores the whole result array in one clock;
//                          the outside reads it one BUS_W-bit word per clock.
// Timing of one operation (defaults M=10, K=2, N=16, BUS_W=32): 60 write cycles, then add
// for one cycle (all locations onto the bus), one cycle for step 1, one for step 2, one
// for the write into the output memory, after which ready is high and 32 read cycles
// fetch the result: 96 cycles in all. The structure, sizes and cycle budget follow the
// design; the word layout, the handshake (add pulse, ready level) and the reset are this
// implementation's choices.
module qsd_array_adder_top
  import qsd_pkg::*;
#(
  parameter int unsigned M     = 10,  // rows of each array
  parameter int unsigned K     = 2,   // columns of each array
  parameter int unsigned N     = 16,  // QSD digits per number
  parameter int unsigned BUS_W = 32,  // external data bus width
  localparam int unsigned ARR_W     = M * K * N * DIGIT_W,        // bits of one input array
  localparam int unsigned RES_W     = M * K * (N + 1) * DIGIT_W,  // bits of the result array
  localparam int unsigned IN_WORDS  = (2 * ARR_W + BUS_W - 1) / BUS_W,
  localparam int unsigned OUT_WORDS = (RES_W + BUS_W - 1) / BUS_W,
  localparam int unsigned IN_AW     = (IN_WORDS > 1) ? $clog2(IN_WORDS) : 1,
  localparam int unsigned OUT_AW    = (OUT_WORDS > 1) ? $clog2(OUT_WORDS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // input side: write & control signals, address, data
  input  logic               in_wr,
  input  logic [IN_AW-1:0]   in_addr,
  input  logic [BUS_W-1:0]   in_data,
  input  logic               add,       // start: both arrays are loaded
  // output side
  input  logic [OUT_AW-1:0]  out_addr,
  output logic [BUS_W-1:0]   out_data,
  output logic               ready      // result array stored and readable; cleared by add
);

  logic [IN_WORDS*BUS_W-1:0] in_bus;
  logic                      add_sig;
  logic                      write_sig;
  logic [RES_W-1:0]          res_bus;

  qsd_input_memory #(.BUS_W(BUS_W), .WORDS(IN_WORDS)) u_in (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (in_wr),
    .wr_addr (in_addr),
    .wr_data (in_data),
    .add     (add),
    .bus     (in_bus),
    .add_out (add_sig)
  );

  qsd_array_adder #(.M(M), .K(K), .N(N)) u_adder (
    .clk   (clk),
    .rst_n (rst_n),
    .add   (add_sig),
    .a     (in_bus[0 +: ARR_W]),
    .b     (in_bus[ARR_W +: ARR_W]),
    .write (write_sig),
    .sum   (res_bus)
  );

  qsd_output_memory #(.BUS_W(BUS_W), .DATA_W(RES_W)) u_out (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (add),
    .wr      (write_sig),
    .wr_data (res_bus),
    .rd_addr (out_addr),
    .rd_data (out_data),
    .ready   (ready)
  );

endmodule
