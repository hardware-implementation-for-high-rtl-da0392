// tb_qsd_output_memory: checks the result memory locations.
//
// Presents a random 1020-bit result array with wr high for one clock, then reads all 32
// locations, one per clock, and compares each word with the matching 32-bit slice (the
// top 4 bits of word 31 must read 0). Checks that ready rises with each write and falls with clear,
// that the contents stay put while wr is low and the input changes, and that a second
// write replaces the whole array.
module tb_qsd_output_memory;

  localparam int BUS_W = 32, DATA_W = 1020, WORDS = 32, AW = 5;

  logic clk = 0, rst_n = 0, wr = 0, clear = 0;
  logic [DATA_W-1:0] wr_data = '0;
  logic [AW-1:0] rd_addr = '0;
  logic [BUS_W-1:0] rd_data;
  logic ready;
  logic [WORDS*BUS_W-1:0] expect_flat;
  int checks = 0, failures = 0;

  qsd_output_memory #(.BUS_W(BUS_W), .DATA_W(DATA_W)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .wr(wr), .wr_data(wr_data),
    .rd_addr(rd_addr), .rd_data(rd_data), .ready(ready)
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W-1:0] rand_array();
    logic [DATA_W-1:0] r;
    for (int i = 0; i < DATA_W; i += 32) r[i +: 32] = $urandom();
    return r;
  endfunction

  task automatic read_all(string what);
    for (int w = 0; w < WORDS; w++) begin
      rd_addr = AW'(w);
      #1;
      checks++;
      if (rd_data !== expect_flat[w*BUS_W +: BUS_W]) begin
        failures++;
        $display("FAIL %s word %0d: %h expected %h", what, w, rd_data, expect_flat[w*BUS_W +: BUS_W]);
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      wr_data = rand_array();
      expect_flat = '0;
      expect_flat[DATA_W-1:0] = wr_data;
      checks++;
      if (ready !== 1'b0) begin failures++; $display("FAIL ready before write"); end
      wr = 1;
      @(posedge clk); #1;
      wr = 0;
      checks++;
      if (ready !== 1'b1) begin failures++; $display("FAIL ready after write"); end
      wr_data = ~wr_data;  // must not be stored
      read_all("read");
      clear = 1;
      @(posedge clk); #1;
      clear = 0;
      checks++;
      if (ready !== 1'b0) begin failures++; $display("FAIL ready not cleared"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
