// tb_arbiter: checks the stream-to-partition arbiter against a cycle-level
// model of its rules, at S=4 streams, P=4 partitions, D=2.
//  * directed: four streams aimed at four different partitions all go every
//    cycle (N items in N cycles);
//  * directed: four streams aimed at one partition go one per cycle, in the
//    order given by the slowest-first priority;
//  * random: random partitions, a slow stream and random output stalls.
//    Every cycle the model works out which stream each partition must
//    take (slowest-first search among the streams that have an index for it
//    and are within D of the slowest) and compares with the arbiter, and
//    checks address, stream and sequence number of every item, and that no
//    stream ever gets more than D+1 items ahead of another.
module tb_arbiter;
  localparam int S = 4, P = 4, D = 2, IDX_W = 12, SEQ_W = 6;
  localparam int LOG2P = 2, ADDR_W = IDX_W - LOG2P, SID_W = 2;

  logic clk = 0, rst_n = 0;
  logic              in_valid [S];
  logic              in_ready [S];
  logic [IDX_W-1:0]  in_idx   [S];
  logic              out_valid  [P];
  logic              out_ready  [P];
  logic [ADDR_W-1:0] out_addr   [P];
  logic [SID_W-1:0]  out_stream [P];
  logic [SEQ_W-1:0]  out_seq    [P];
  logic              ev_conflict, ev_full, ev_ratelimit;

  int checks = 0, failures = 0;
  int n_conflict = 0, n_full = 0, n_rate = 0;
  // model state
  logic [IDX_W-1:0] pend [S][$];   // index accepted but not yet sent
  int cnt [S];                     // indices sent per stream

  arbiter #(.S(S), .P(P), .D(D), .IDX_W(IDX_W), .SEQ_W(SEQ_W)) dut (.*);

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

  // model: per partition, the stream that must be chosen (-1 for none)
  function automatic int expected_winner(int p);
    int mn, slow, s;
    bit has;
    logic [IDX_W-1:0] c;
    slow = 0; mn = cnt[0];
    for (int t = 1; t < S; t++) if (cnt[t] < mn) begin mn = cnt[t]; slow = t; end
    for (int k = 0; k < S; k++) begin
      s = (slow + k) % S;
      has = (pend[s].size() > 0) || in_valid[s];
      c = (pend[s].size() > 0) ? pend[s][0] : in_idx[s];
      if (has && (cnt[s] - mn <= D) && int'(c[IDX_W-1 -: LOG2P]) == p) return s;
    end
    return -1;
  endfunction

  // compare and update the model every cycle
  always @(posedge clk) if (rst_n) begin
    int w, mn;
    logic [IDX_W-1:0] c;
    bit took [S];
    mn = cnt[0];
    for (int t = 1; t < S; t++) if (cnt[t] < mn) mn = cnt[t];
    for (int s = 0; s < S; s++) took[s] = 0;
    for (int p = 0; p < P; p++) begin
      w = expected_winner(p);
      check(out_valid[p] == (w >= 0), $sformatf("partition %0d valid", p));
      if (out_valid[p] && w >= 0) begin
        check(int'(out_stream[p]) == w, $sformatf("partition %0d winner %0d got %0d", p, w, out_stream[p]));
        c = (pend[w].size() > 0) ? pend[w][0] : in_idx[w];
        check(out_addr[p] == c[ADDR_W-1:0], "address");
        check(out_seq[p] == SEQ_W'(cnt[w]), "sequence number");
        check(cnt[w] - mn <= D, "ratelimit distance");
        if (out_ready[p]) took[w] = 1;
      end
    end
    if (ev_conflict) n_conflict++;
    if (ev_full) n_full++;
    if (ev_ratelimit) n_rate++;
    for (int s = 0; s < S; s++) begin
      if (in_valid[s] && in_ready[s]) pend[s].push_back(in_idx[s]);
      if (took[s]) begin
        void'(pend[s].pop_front());
        cnt[s]++;
      end
      check(pend[s].size() <= 1, "one buffered index per stream");
    end
  end

  // drive: stream s sends n indices; part<0 picks random partitions
  int sent_n [S];
  task automatic drive(int n, int part_of [S], int slow_pct, int ready_pct, int slow_stream);
    for (int s = 0; s < S; s++) sent_n[s] = 0;
    while (1) begin
      bit busy;
      busy = 0;
      for (int s = 0; s < S; s++) begin
        int pct;
        pct = (s == slow_stream) ? slow_pct : 100;
        in_valid[s] = (sent_n[s] < n) && ($urandom_range(0, 99) < pct);
        in_idx[s]   = IDX_W'($urandom);
        if (part_of[s] >= 0) in_idx[s][IDX_W-1 -: LOG2P] = LOG2P'(part_of[s]);
        if (sent_n[s] < n) busy = 1;
      end
      for (int p = 0; p < P; p++) out_ready[p] = ($urandom_range(0, 99) < ready_pct);
      if (!busy) break;
      @(posedge clk);
      for (int s = 0; s < S; s++) if (in_valid[s] && in_ready[s]) sent_n[s]++;
      @(negedge clk);
    end
    for (int s = 0; s < S; s++) in_valid[s] = 0;
    for (int p = 0; p < P; p++) out_ready[p] = 1;
    // drain
    repeat (20) @(negedge clk);
  endtask

  initial begin
    int parts [S];
    int t0, cnt0;
    for (int s = 0; s < S; s++) begin in_valid[s] = 0; in_idx[s] = 0; cnt[s] = 0; end
    for (int p = 0; p < P; p++) out_ready[p] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1) no conflict: 50 items per stream in 50 cycles
    for (int s = 0; s < S; s++) parts[s] = s;
    t0 = $time; cnt0 = cnt[0];
    drive(50, parts, 100, 100, -1);
    check(($time - t0) / 10 == 50 + 20, "four streams, four partitions: one item per stream per cycle");
    for (int s = 0; s < S; s++) check(cnt[s] == 50, "all items sent");

    // 2) full conflict: all four to partition 1
    for (int s = 0; s < S; s++) parts[s] = 1;
    drive(20, parts, 100, 100, -1);
    for (int s = 0; s < S; s++) check(cnt[s] == 70, "all items sent after conflicts");

    // 3) random, with one slow stream and output stalls
    for (int s = 0; s < S; s++) parts[s] = -1;
    drive(3000, parts, 30, 70, 2);
    for (int s = 0; s < S; s++) check(cnt[s] == 3070, "all random items sent");

    check(n_conflict > 0, "conflicts seen");
    check(n_full > 0, "full outputs seen");
    check(n_rate > 0, "ratelimit pauses seen");
    $display("events: conflict=%0d full=%0d ratelimit=%0d", n_conflict, n_full, n_rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
