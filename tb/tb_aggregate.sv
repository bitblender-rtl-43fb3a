// tb_aggregate: H=9 result streams arrive with independent random gaps;
// the aggregate must pair the n-th item of every input, output their AND
// in order, and accept nothing until all nine are present. Also checks the
// one-cycle latency and one result per cycle when all inputs are present.
module tb_aggregate;
  localparam int H = 9;
  logic clk = 0, rst_n = 0;
  logic in_valid [H], in_ready [H], in_hit [H];
  logic out_valid, out_ready, out_hit;
  int checks = 0, failures = 0;
  bit src [H][$];      // bits still to be offered per input
  bit expq [$];        // results expected, in order
  int n_out = 0;

  aggregate #(.H(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    bit all;
    all = 1;
    for (int h = 0; h < H; h++) all &= in_valid[h];
    for (int h = 0; h < H; h++) if (in_ready[h]) check(all, "input taken only when all are valid");
    if (out_valid && out_ready) begin
      check(expq.size() > 0 && out_hit == expq[0], "AND result");
      if (expq.size() > 0) void'(expq.pop_front());
      n_out++;
    end
    for (int h = 0; h < H; h++)
      if (in_valid[h] && in_ready[h]) void'(src[h].pop_front());
  end

  task automatic make(int n, int ones_pct);
    for (int i = 0; i < n; i++) begin
      bit a;
      a = 1;
      for (int h = 0; h < H; h++) begin
        bit b;
        b = ($urandom_range(0, 99) < ones_pct);
        src[h].push_back(b);
        a &= b;
      end
      expq.push_back(a);
    end
  endtask

  initial begin
    int t0;
    for (int h = 0; h < H; h++) begin in_valid[h] = 0; in_hit[h] = 0; end
    out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // full rate, all present: 50 results in 50 cycles, first one after 1
    make(50, 90);
    t0 = n_out;
    for (int i = 0; i < 50; i++) begin
      for (int h = 0; h < H; h++) begin in_valid[h] = 1; in_hit[h] = src[h][0]; end
      @(negedge clk);
      check(out_valid, "result one cycle after inputs");
    end
    for (int h = 0; h < H; h++) in_valid[h] = 0;
    @(negedge clk);
    check(n_out - t0 == 50, "one result per cycle");
    // random arrival and stalls
    make(3000, 93);
    while (expq.size() > 0) begin
      for (int h = 0; h < H; h++) begin
        in_valid[h] = (src[h].size() > 0) && ($urandom_range(0, 9) < 8);
        in_hit[h]   = (src[h].size() > 0) ? src[h][0] : 1'b0;
      end
      out_ready = ($urandom_range(0, 3) != 0);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
