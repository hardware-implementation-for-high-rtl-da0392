// qsd_input_memory: distributed memory locations holding the two input QSD arrays.
//
// The two arrays enter from outside as WORDS words of BUS_W bits, one word per clock,
// each word written (wr_en high) into its own location selected by wr_addr. Each
// location stands for the first word of one on-chip memory block, so all of them can be
// read at the same time: when add is high, the whole contents are copied in one clock
// onto the registered parallel bus and add_out (the ADD signal to the array adder) is
// raised for one cycle. A word may be written in the same cycle as add; the bus then
// carries the old word.
//
// Word layout (this implementation's choice): the flat vector {array B, array A}, each
// array being its numbers packed number 0 lowest, is cut into BUS_W-bit words, word 0
// holding bits [BUS_W-1:0]; so with the defaults words 0..29 carry array A and 30..59
// array B. Locations are not reset; add_out is.
module qsd_input_memory #(
  parameter int unsigned BUS_W  = 32,  // external data bus width
  parameter int unsigned WORDS  = 60,  // memory locations (pieces of the two arrays)
  parameter int unsigned ADDR_W = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,    // write wr_data into location wr_addr
  input  logic [ADDR_W-1:0]        wr_addr,
  input  logic [BUS_W-1:0]         wr_data,
  input  logic                     add,      // read all locations onto the bus and start
  output logic [WORDS*BUS_W-1:0]   bus,      // parallel bus: all locations, word 0 lowest
  output logic                     add_out   // ADD signal, one cycle, bus valid with it
);

  logic [BUS_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (add) begin
      for (int w = 0; w < WORDS; w++) bus[w*BUS_W +: BUS_W] <= mem[w];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) add_out <= 1'b0;
    else        add_out <= add;
  end

  // The external controller must stay inside the locations that exist.
  always_ff @(posedge clk) begin
    if (wr_en)
      assert (32'(wr_addr) < WORDS) else $error("qsd_input_memory: write address %0d out of range", wr_addr);
  end

endmodule
