// tb_qsd_number_adder: checks the N-digit two-step QSD adder (N = 16).
//
// First adds the 16-digit example pair (2005267773 + 894701077) and compares every one of
// the 17 result digits with the known answer 0 2 3 -1 1 -1 1 2 2 0 0 1 -1 1 1 0 2
// (= 2899968850). Then streams random digit vectors, with in_valid high on random
// cycles, and checks for every result: its value equals the sum of the operand values
// (computed with 64-bit integers), every digit is a legal code, it appears exactly two
// clocks after its operands, and the registered intermediate sums/carries one clock
// after them satisfy x + y = 4c + s digit by digit.
module tb_qsd_number_adder;
  import qsd_pkg::*;

  localparam int N = 16;

  logic clk = 0, rst_n = 0, in_valid = 0;
  qsd_digit_t [N-1:0] x, y, s_q, c_q;
  qsd_digit_t [N:0]   z;
  logic mid_valid, out_valid;
  int checks = 0, failures = 0, cycle = 0;

  qsd_number_adder #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y),
    .mid_valid(mid_valid), .s_q(s_q), .c_q(c_q), .out_valid(out_valid), .z(z)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic logic [2:0] enc(int v);
    return (v < 0) ? {1'b1, 2'(-v)} : {1'b0, 2'(v)};
  endfunction
  function automatic int dec(logic [2:0] d);
    return d[2] ? -int'(d[1:0]) : int'(d[1:0]);
  endfunction
  function automatic longint val(logic [3*(N+1)-1:0] v, int nd);
    longint r = 0;
    for (int i = nd - 1; i >= 0; i--) r = r * 4 + longint'(dec(v[3*i +: 3]));
    return r;
  endfunction

  // Expected results, in order: value, operands and input cycle.
  longint exp_val[$];
  int     exp_cyc[$];
  logic [3*N-1:0] mid_x[$], mid_y[$];
  int outputs = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && mid_valid) begin
      logic [3*N-1:0] ox, oy;
      int tx, ty, ts, tc;
      ox = mid_x.pop_front(); oy = mid_y.pop_front();
      for (int i = 0; i < N; i++) begin
        tx = dec(ox[3*i +: 3]); ty = dec(oy[3*i +: 3]);
        ts = dec(s_q[i]); tc = dec(c_q[i]);
        checks++;
        if (tx + ty != 4 * tc + ts || ts < -2 || ts > 2 || tc < -1 || tc > 1) begin
          failures++;
          $display("FAIL step1 digit %0d: %0d+%0d gave s=%0d c=%0d", i, tx, ty, ts, tc);
        end
      end
    end
    if (rst_n && out_valid) begin
      longint got;
      got = val(z, N + 1);
      checks++;
      if (exp_val.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        if (got != exp_val[0] || cycle - exp_cyc[0] != 2) begin
          failures++;
          $display("FAIL result %0d after %0d cycles, expected %0d after 2", got, cycle - exp_cyc[0], exp_val[0]);
        end
        for (int i = 0; i <= N; i++) begin
          checks++;
          if (z[i] == 3'b100) begin failures++; $display("FAIL digit %0d coded 100", i); end
        end
        void'(exp_val.pop_front()); void'(exp_cyc.pop_front());
      end
      outputs++;
    end
  end

  task automatic apply(logic [3*N-1:0] a, logic [3*N-1:0] b);
    x = a; y = b; in_valid = 1;
    exp_val.push_back(val(51'(a), N) + val(51'(b), N));
    exp_cyc.push_back(cycle + 1);
    mid_x.push_back(a); mid_y.push_back(b);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  int ex_a[N] = '{1, 3, 2, 0, -2, 0, 1, 2, 0, -1, 1, 2, -3, -1, 3, 1};
  int ex_b[N] = '{0, 3, 1, 2, -3, 1, 1, 0, 0, 1, -1, 2, 0, 1, 1, 1};
  int ex_z[N+1] = '{0, 2, 3, -1, 1, -1, 1, 2, 2, 0, 0, 1, -1, 1, 1, 0, 2};

  initial begin
    logic [3*N-1:0] a, b;
    x = '0; y = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // Example pair, most significant digit first in the lists above.
    for (int i = 0; i < N; i++) begin
      a[3*(N-1-i) +: 3] = enc(ex_a[i]);
      b[3*(N-1-i) +: 3] = enc(ex_b[i]);
    end
    checks++;
    if (val(51'(a), N) != 64'd2005267773 || val(51'(b), N) != 64'd894701077) begin
      failures++; $display("FAIL example operand encoding");
    end
    apply(a, b);
    @(posedge clk); #1;
    for (int i = 0; i <= N; i++) begin
      checks++;
      if (z[N-i] !== enc(ex_z[i])) begin
        failures++;
        $display("FAIL example digit %0d: got %0d expected %0d", N - i, dec(z[N-i]), ex_z[i]);
      end
    end
    checks++;
    if (val(z, N + 1) != 64'd2899968850) begin failures++; $display("FAIL example value"); end
    repeat (3) @(posedge clk); #1;
    // Random stream; extreme pairs included.
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) begin
        int da, db;
        da = int'($urandom_range(6)) - 3;
        db = int'($urandom_range(6)) - 3;
        if (t == 1) begin da = 3; db = 3; end
        if (t == 2) begin da = -3; db = -3; end
        a[3*i +: 3] = enc(da);
        b[3*i +: 3] = enc(db);
      end
      if ($urandom_range(3) == 0) begin @(posedge clk); #1; end
      apply(a, b);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (outputs != 2001 || exp_val.size() != 0) begin
      failures++; $display("FAIL %0d results for 2001 operand pairs", outputs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
