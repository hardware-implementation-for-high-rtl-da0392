// tb_qsd_array_adder: checks the parallel adder of two 10 x 2 arrays of 16-digit QSD numbers.
//
// Each test fills both arrays with random digits (one element is the all-3 / all-3 and one
// the all-(-3) / all-(-3) extreme), raises add for one clock and expects write exactly
// two clocks later, for one clock, with every element of sum equal in value to the sum
// of its operands (64-bit integer arithmetic) and every digit a legal code. The last
// two tests are issued on consecutive clocks to show that the adder is pipelined.
module tb_qsd_array_adder;

  localparam int M = 10, K = 2, N = 16, E = M * K;
  localparam int IN_W = N * 3, OUT_W = (N + 1) * 3;

  logic clk = 0, rst_n = 0, add = 0;
  logic [E*IN_W-1:0] a, b;
  logic [E*OUT_W-1:0] sum;
  logic write;
  int checks = 0, failures = 0, cycle = 0, writes = 0;
  logic [E*IN_W-1:0] qa[$], qb[$];
  int qc[$];

  qsd_array_adder #(.M(M), .K(K), .N(N)) dut (
    .clk(clk), .rst_n(rst_n), .add(add), .a(a), .b(b), .write(write), .sum(sum)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic logic [2:0] enc(int v);
    return (v < 0) ? {1'b1, 2'(-v)} : {1'b0, 2'(v)};
  endfunction
  function automatic longint dec(logic [2:0] d);
    return d[2] ? -longint'(d[1:0]) : longint'(d[1:0]);
  endfunction
  function automatic longint val(logic [OUT_W-1:0] v, int nd);
    longint r = 0;
    for (int i = nd - 1; i >= 0; i--) r = r * 4 + dec(v[3*i +: 3]);
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && write) begin
      logic [E*IN_W-1:0] ea, eb;
      writes++;
      checks++;
      if (qa.size() == 0 || cycle - qc[0] != 2) begin
        failures++;
        $display("FAIL write at cycle %0d not two clocks after add", cycle);
      end else begin
        ea = qa.pop_front(); eb = qb.pop_front(); void'(qc.pop_front());
        for (int e = 0; e < E; e++) begin
          longint got, want;
          got  = val(sum[e*OUT_W +: OUT_W], N + 1);
          want = val(OUT_W'(ea[e*IN_W +: IN_W]), N) + val(OUT_W'(eb[e*IN_W +: IN_W]), N);
          checks++;
          if (got != want) begin
            failures++;
            $display("FAIL element %0d: %0d expected %0d", e, got, want);
          end
          for (int i = 0; i <= N; i++) begin
            checks++;
            if (sum[e*OUT_W + 3*i +: 3] == 3'b100) begin failures++; $display("FAIL code 100"); end
          end
        end
      end
    end
  end

  task automatic fill();
    for (int e = 0; e < E; e++)
      for (int i = 0; i < N; i++) begin
        int da, db;
        da = int'($urandom_range(6)) - 3;
        db = int'($urandom_range(6)) - 3;
        if (e == 3) begin da = 3;  db = 3;  end
        if (e == 4) begin da = -3; db = -3; end
        a[e*IN_W + 3*i +: 3] = enc(da);
        b[e*IN_W + 3*i +: 3] = enc(db);
      end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      fill();
      add = 1; qa.push_back(a); qb.push_back(b); qc.push_back(cycle + 1);
      @(posedge clk); #1;
      add = 0;
      if (t < 38) repeat (3) @(posedge clk);
      #1;
    end
    repeat (4) @(posedge clk);
    checks++;
    if (writes != 40) begin failures++; $display("FAIL %0d writes for 40 adds", writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
