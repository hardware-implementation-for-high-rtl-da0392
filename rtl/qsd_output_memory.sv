// qsd_output_memory: distributed memory locations holding the result QSD array.
//
// When wr (the write signal of the array adder) is high, the whole result array, cut
// into WORDS words of BUS_W bits, is stored in one clock, each word in its own location
// (the first word of one on-chip memory block). The outside then reads one word per
// clock: rd_data shows the location selected by rd_addr in the same cycle. ready goes
// high the clock after a write and stays high until clear (a new addition has started)
// or reset, telling the outside that the stored array is a complete, current result.
//
// Word layout (this implementation's choice): the result array, numbers packed number 0
// lowest with N+1 digits each, word 0 holding bits [BUS_W-1:0]; the unused top bits of
// the last word read as 0. The read port is combinational so that WORDS reads take
// WORDS clocks. Locations are not reset; ready is.
module qsd_output_memory #(
  parameter int unsigned BUS_W  = 32,    // external data bus width
  parameter int unsigned DATA_W = 1020,  // bits of the result array
  parameter int unsigned WORDS  = (DATA_W + BUS_W - 1) / BUS_W,
  parameter int unsigned ADDR_W = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,    // a new addition started: result no longer current
  input  logic                 wr,       // write signal: store the whole array
  input  logic [DATA_W-1:0]    wr_data,  // result array from the parallel bus
  input  logic [ADDR_W-1:0]    rd_addr,
  output logic [BUS_W-1:0]     rd_data,
  output logic                 ready     // a result has been stored
);

  logic [BUS_W-1:0] mem [WORDS];
  logic [WORDS*BUS_W-1:0] padded;

  assign padded = (WORDS*BUS_W)'(wr_data);

  always_ff @(posedge clk) begin
    if (wr) begin
      for (int w = 0; w < WORDS; w++) mem[w] <= padded[w*BUS_W +: BUS_W];
    end
  end

  assign rd_data = (32'(rd_addr) < WORDS) ? mem[rd_addr] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ready <= 1'b0;
    else if (wr)    ready <= 1'b1;
    else if (clear) ready <= 1'b0;
  end

endmodule
