// tb_unshuffle: the unshuffle at S=3 streams, P=4 partitions, D=3. Items of
// the three streams are spread over random partitions in an interleaving
// that keeps every stream within D items of the slowest (what the arbiter
// guarantees), so items of one stream reach the unshuffle out of order.
// Each stream's output must come back in order with the right hit bits,
// under random input gaps and output stalls. Also counts that items did
// arrive out of order and that full buffers did hold an input, and checks
// one-cycle pass-through latency and the full rate of S results per cycle.
module tb_unshuffle;
  localparam int S = 3, P = 4, D = 3, SEQ_W = 8, SID_W = 2;
  logic clk = 0, rst_n = 0;
  logic             in_valid  [P];
  logic             in_ready  [P];
  logic             in_hit    [P];
  logic [SID_W-1:0] in_stream [P];
  logic [SEQ_W-1:0] in_seq    [P];
  logic             out_valid [S];
  logic             out_ready [S];
  logic             out_hit   [S];

  typedef struct { int s; int seq; bit hit; } item_t;
  item_t pq [P][$];          // items waiting per partition
  bit    expq [S][$];        // expected hits per stream, in order
  int    seen [S];           // items of each stream already arrived (by seq)
  int checks = 0, failures = 0, n_ooo = 0, n_block = 0, n_out = 0;

  unshuffle #(.S(S), .P(P), .D(D), .SEQ_W(SEQ_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int arrived_next [S];   // lowest seq not yet arrived, per stream
  bit arrived [S][int];
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < S; s++)
      if (out_valid[s] && out_ready[s]) begin
        check(expq[s].size() > 0 && out_hit[s] == expq[s][0], $sformatf("stream %0d in-order hit", s));
        if (expq[s].size() > 0) void'(expq[s].pop_front());
        n_out++;
      end
    for (int p = 0; p < P; p++) begin
      if (in_valid[p] && !in_ready[p]) n_block++;
      if (in_valid[p] && in_ready[p]) begin
        int s;
        s = pq[p][0].s;
        if (pq[p][0].seq != arrived_next[s]) n_ooo++;
        arrived[s][pq[p][0].seq] = 1;
        while (arrived[s].exists(arrived_next[s])) arrived_next[s]++;
        void'(pq[p].pop_front());
      end
    end
  end

  // generate n items per stream with ratelimited interleaving
  task automatic make(int n, bit fixed_part);
    int issued [S];
    for (int s = 0; s < S; s++) issued[s] = seen[s];
    while (1) begin
      int mn, s, tries;
      bit left;
      item_t it;
      left = 0;
      mn = issued[0];
      for (int t = 0; t < S; t++) begin
        if (issued[t] < seen[t] + n) left = 1;
        if (issued[t] < mn) mn = issued[t];
      end
      if (!left) break;
      do s = $urandom_range(0, S - 1);
      while (issued[s] >= seen[s] + n || issued[s] - mn > D);
      it.s = s; it.seq = issued[s]; it.hit = $urandom_range(0, 1);
      pq[fixed_part ? s : $urandom_range(0, P - 1)].push_back(it);
      expq[s].push_back(it.hit);
      issued[s]++;
    end
    for (int s = 0; s < S; s++) seen[s] += n;
  endtask

  task automatic run(int in_pct, int out_pct);
    bit busy;
    do begin
      busy = 0;
      for (int p = 0; p < P; p++) begin
        in_valid[p] = (pq[p].size() > 0) && ($urandom_range(0, 99) < in_pct);
        if (pq[p].size() > 0) begin
          in_stream[p] = SID_W'(pq[p][0].s);
          in_seq[p]    = SEQ_W'(pq[p][0].seq);
          in_hit[p]    = pq[p][0].hit;
          busy = 1;
        end
      end
      for (int s = 0; s < S; s++) begin
        out_ready[s] = ($urandom_range(0, 99) < out_pct);
        if (expq[s].size() > 0) busy = 1;
      end
      @(negedge clk);
    end while (busy);
  endtask

  initial begin
    int t0;
    for (int p = 0; p < P; p++) begin in_valid[p] = 0; in_hit[p] = 0; in_stream[p] = 0; in_seq[p] = 0; end
    for (int s = 0; s < S; s++) begin out_ready[s] = 1; seen[s] = 0; arrived_next[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // one item: out one cycle after it was accepted
    make(1, 1);
    in_valid[0] = 1; in_stream[0] = 0; in_seq[0] = 0; in_hit[0] = expq[0][0];
    @(negedge clk);
    in_valid[0] = 0;
    check(out_valid[0] && out_hit[0] == expq[0][0], "one-cycle latency");
    run(100, 100);
    // full rate: every stream on its own partition, 100 items in ~100 cycles
    make(100, 1);
    t0 = n_out;
    repeat (101) begin
      for (int p = 0; p < P; p++) begin
        in_valid[p] = (pq[p].size() > 0);
        if (pq[p].size() > 0) begin
          in_stream[p] = SID_W'(pq[p][0].s); in_seq[p] = SEQ_W'(pq[p][0].seq); in_hit[p] = pq[p][0].hit;
        end
      end
      @(negedge clk);
    end
    check(n_out - t0 == 300, $sformatf("S results per cycle (%0d in 101 cycles)", n_out - t0));
    run(100, 100);
    // random
    for (int r = 0; r < 20; r++) begin
      make(200, 0);
      run(60 + r, 40 + 2 * r);
    end
    check(n_ooo > 0, "out-of-order arrivals seen");
    check(n_block > 0, "full value buffer held an input");
    $display("events: out_of_order=%0d blocked=%0d", n_ooo, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
