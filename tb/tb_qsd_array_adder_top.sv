// tb_qsd_array_adder_top: end-to-end test of the QSD array adder chip at its default size
// (two 10 x 2 arrays of 16-digit numbers, 32-bit data bus).
//
// Plays the external hardware for three complete additions. Each one writes the 60 input
// words (array A in words 0..29, array B in 30..59), raises add for one clock, waits for
// ready and reads the 32 result words. The result of every element is compared with the
// sum of its operand values (64-bit integers); element 0 of the first addition is the
// 16-digit example pair 2005267773 + 894701077, whose 17 result digits are compared one
// by one with the known answer. The clock budget is checked: ready must rise exactly 4
// clocks after the last input word (1 read-out, 2 addition steps, 1 result write) and
// the whole operation, loading to last read, must take 60 + 4 + 32 = 96 clocks.
// The mechanisms are counted and each must occur: step-1 carries of +1 and -1,
// negative digits in the operands and in the result, a final carry digit of +1, of -1
// and of 0, ready being cleared by a new add, and reuse of the chip for a new addition.
module tb_qsd_array_adder_top;

  localparam int M = 10, K = 2, N = 16, E = M * K, BUS_W = 32;
  localparam int IN_W = N * 3, OUT_W = (N + 1) * 3;
  localparam int IN_WORDS = 60, OUT_WORDS = 32;

  logic clk = 0, rst_n = 0, in_wr = 0, add = 0;
  logic [5:0] in_addr = '0;
  logic [BUS_W-1:0] in_data = '0;
  logic [4:0] out_addr = '0;
  logic [BUS_W-1:0] out_data;
  logic ready;
  int checks = 0, failures = 0, cycle = 0;

  // mechanism counters
  int n_carry_pos = 0, n_carry_neg = 0, n_neg_in = 0, n_neg_out = 0;
  int n_msd_pos = 0, n_msd_neg = 0, n_msd_zero = 0, n_ready_clear = 0, n_ops = 0;

  qsd_array_adder_top dut (
    .clk(clk), .rst_n(rst_n), .in_wr(in_wr), .in_addr(in_addr), .in_data(in_data),
    .add(add), .out_addr(out_addr), .out_data(out_data), .ready(ready)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic logic [2:0] enc(int v);
    return (v < 0) ? {1'b1, 2'(-v)} : {1'b0, 2'(v)};
  endfunction
  function automatic int dec(logic [2:0] d);
    return d[2] ? -int'(d[1:0]) : int'(d[1:0]);
  endfunction
  function automatic longint val(logic [OUT_W-1:0] v, int nd);
    longint r = 0;
    for (int i = nd - 1; i >= 0; i--) r = r * 4 + longint'(dec(v[3*i +: 3]));
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ex_a[N] = '{1, 3, 2, 0, -2, 0, 1, 2, 0, -1, 1, 2, -3, -1, 3, 1};
  int ex_b[N] = '{0, 3, 1, 2, -3, 1, 1, 0, 0, 1, -1, 2, 0, 1, 1, 1};
  int ex_z[N+1] = '{0, 2, 3, -1, 1, -1, 1, 2, 2, 0, 0, 1, -1, 1, 1, 0, 2};

  task automatic run_op(int op);
    logic [E*IN_W-1:0] a, b;
    logic [2*E*IN_W-1:0] flat_in;
    logic [OUT_WORDS*BUS_W-1:0] flat_out;
    int start, t_ready;
    // operands
    for (int e = 0; e < E; e++)
      for (int i = 0; i < N; i++) begin
        int da, db;
        da = int'($urandom_range(6)) - 3;
        db = int'($urandom_range(6)) - 3;
        if (op == 0 && e == 0) begin da = ex_a[N-1-i]; db = ex_b[N-1-i]; end
        if (op == 2 && e == 1) begin da = 3;  db = 3;  end
        if (op == 2 && e == 2) begin da = -3; db = -3; end
        if (op == 2 && e == 3) begin da = (i == N-1) ? -1 : 0; db = 0; end
        if (da < 0 || db < 0) n_neg_in++;
        if (da + db >= 3) n_carry_pos++;
        if (da + db <= -3) n_carry_neg++;
        a[e*IN_W + 3*i +: 3] = enc(da);
        b[e*IN_W + 3*i +: 3] = enc(db);
      end
    flat_in = {b, a};
    // load: one word per clock
    start = cycle;
    for (int w = 0; w < IN_WORDS; w++) begin
      in_wr = 1; in_addr = 6'(w); in_data = flat_in[w*BUS_W +: BUS_W];
      @(posedge clk); #1;
    end
    in_wr = 0;
    add = 1;
    @(posedge clk); #1;
    add = 0;
    if (op > 0) begin
      checks++;
      if (ready !== 1'b0) begin failures++; $display("FAIL ready not cleared by add"); end
      else n_ready_clear++;
    end
    while (ready !== 1'b1 && cycle - start < 200) begin @(posedge clk); #1; end
    t_ready = cycle - start;
    checks++;
    if (t_ready != IN_WORDS + 4) begin
      failures++;
      $display("FAIL ready after %0d clocks, expected %0d", t_ready, IN_WORDS + 4);
    end
    // read out: one word per clock
    for (int w = 0; w < OUT_WORDS; w++) begin
      out_addr = 5'(w);
      #1;
      flat_out[w*BUS_W +: BUS_W] = out_data;
      @(posedge clk); #1;
    end
    checks++;
    if (cycle - start != 96) begin
      failures++; $display("FAIL operation took %0d clocks, expected 96", cycle - start);
    end
    // results
    for (int e = 0; e < E; e++) begin
      logic [OUT_W-1:0] z;
      longint want;
      int msd;
      z = flat_out[e*OUT_W +: OUT_W];
      want = val(OUT_W'(a[e*IN_W +: IN_W]), N) + val(OUT_W'(b[e*IN_W +: IN_W]), N);
      checks++;
      if (val(z, N + 1) != want) begin
        failures++; $display("FAIL op %0d element %0d: %0d expected %0d", op, e, val(z, N + 1), want);
      end
      for (int i = 0; i <= N; i++) begin
        checks++;
        if (z[3*i +: 3] == 3'b100) begin failures++; $display("FAIL code 100"); end
        if (z[3*i + 2] == 1'b1) n_neg_out++;
      end
      msd = dec(z[3*N +: 3]);
      if (msd > 0) n_msd_pos++; else if (msd < 0) n_msd_neg++; else n_msd_zero++;
      if (op == 0 && e == 0)
        for (int i = 0; i <= N; i++) begin
          checks++;
          if (dec(z[3*(N-i) +: 3]) != ex_z[i]) begin
            failures++; $display("FAIL example digit %0d", N - i);
          end
        end
    end
    checks++;
    if (flat_out[OUT_WORDS*BUS_W-1 -: 4] !== 4'b0000) begin failures++; $display("FAIL padding bits"); end
    n_ops++;
  endtask

  task automatic need(int count, string what);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (ready !== 1'b0) begin failures++; $display("FAIL ready after reset"); end
    for (int op = 0; op < 3; op++) run_op(op);
    $display("mechanisms:");
    need(n_carry_pos, "step-1 carry +1");
    need(n_carry_neg, "step-1 carry -1");
    need(n_neg_in, "negative operand digits");
    need(n_neg_out, "negative result digits");
    need(n_msd_pos, "final carry digit +1");
    need(n_msd_neg, "final carry digit -1");
    need(n_msd_zero, "final carry digit 0");
    need(n_ready_clear, "ready cleared by add");
    need(n_ops - 1, "chip reused for new addition");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
