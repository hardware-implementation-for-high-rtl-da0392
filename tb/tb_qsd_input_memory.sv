// tb_qsd_input_memory: checks the input memory locations and the ADD read-out.
//
// Writes all 60 locations with random words in a shuffled order with idle cycles in
// between, pulses add, and expects add_out exactly one clock later with the parallel bus
// equal to the 60 words in address order. Then rewrites some words, checks that the bus
// does not change without add, and that a word written in the same cycle as add reaches
// the bus only on the next add. Done twice with fresh data.
module tb_qsd_input_memory;

  localparam int BUS_W = 32, WORDS = 60, AW = 6;

  logic clk = 0, rst_n = 0, wr_en = 0, add = 0;
  logic [AW-1:0] wr_addr = '0;
  logic [BUS_W-1:0] wr_data = '0;
  logic [WORDS*BUS_W-1:0] bus;
  logic add_out;
  logic [BUS_W-1:0] model [WORDS];
  int checks = 0, failures = 0;

  qsd_input_memory #(.BUS_W(BUS_W), .WORDS(WORDS)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .add(add), .bus(bus), .add_out(add_out)
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(int a, logic [BUS_W-1:0] d);
    wr_en = 1; wr_addr = AW'(a); wr_data = d;
    @(posedge clk); #1;
    wr_en = 0;
    model[a] = d;
  endtask

  task automatic check_bus(string what);
    for (int w = 0; w < WORDS; w++) begin
      checks++;
      if (bus[w*BUS_W +: BUS_W] !== model[w]) begin
        failures++;
        $display("FAIL %s: word %0d = %h, expected %h", what, w, bus[w*BUS_W +: BUS_W], model[w]);
      end
    end
  endtask

  initial begin
    int order[WORDS];
    logic [BUS_W-1:0] old;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (add_out !== 1'b0) begin failures++; $display("FAIL add_out after reset"); end
    for (int round = 0; round < 2; round++) begin
      for (int i = 0; i < WORDS; i++) order[i] = i;
      order.shuffle();
      foreach (order[i]) begin
        write_word(order[i], $urandom());
        if ($urandom_range(2) == 0) begin @(posedge clk); #1; end
      end
      add = 1;
      @(posedge clk); #1;
      add = 0;
      checks++;
      if (add_out !== 1'b1) begin failures++; $display("FAIL add_out not raised"); end
      check_bus("after add");
      @(posedge clk); #1;
      checks++;
      if (add_out !== 1'b0) begin failures++; $display("FAIL add_out longer than one cycle"); end
      // Writes without add leave the bus alone.
      old = model[7];
      write_word(7, ~old);
      repeat (2) @(posedge clk);
      #1;
      model[7] = old;
      check_bus("write without add");
      model[7] = ~old;
      // Write in the same cycle as add: the bus takes the old word.
      old = model[59];
      wr_en = 1; wr_addr = 59; wr_data = ~old; add = 1;
      @(posedge clk); #1;
      wr_en = 0; add = 0;
      check_bus("write with add");
      model[59] = ~old;
      add = 1;
      @(posedge clk); #1;
      add = 0;
      check_bus("second add");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
