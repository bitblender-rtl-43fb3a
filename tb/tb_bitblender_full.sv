// tb_bitblender_full: the accelerator at its default sizes (6 streams,
// 9 hash sections of 16 Mbit, 8 partitions per section, ratelimit 16).
// One complete operation: clear the 144 Mbit bit-vector, insert 2000 keys,
// then run 3000 query pairs on each of the six streams at full input rate
// with the outputs always ready, then 1500 more with stream 5 throttled
// to a quarter of the cycles so that the ratelimit acts. Every answer is compared with the
// reference model (MurmurHash3 indices, AND of the model bits); inserted
// keys must be found. Reports the sustained queries per cycle against the
// ideal 2*S and the fraction of cycles in which some arbiter stalled a
// stream, and counts conflicts and ratelimit pauses, which must occur.
module tb_bitblender_full;
  import tb_ref_pkg::*;
  localparam int S = 6, H = 9, IDX_W = 24, P = 8, WORD_W = 64;
  localparam int NQ = 3000, NINS = 2000;

  logic clk = 0, rst_n = 0;
  logic        q_valid [S], q_ready [S];
  logic [31:0] q_key   [S][2];
  logic        r_valid [S], r_ready [S], r_hit [S][2];
  logic        ins_valid, ins_ready, ins_idle, clr_start, busy;
  logic [31:0] ins_key;
  logic        ev_conflict, ev_full, ev_ratelimit;

  int checks = 0, failures = 0;
  int n_conf = 0, n_rate = 0, n_full = 0, n_results = 0, n_fp = 0, n_rand = 0;
  bit bv [H][int];                 // set bits per section
  bit [31:0] inserted [$];
  typedef struct { bit e0, e1, must0, must1; } exp_t;
  exp_t expq [S][$];
  bit m0 [S], m1 [S];

  bitblender_top dut (.*);

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

  function automatic bit model_query(bit [31:0] k);
    for (int h = 0; h < H; h++)
      if (!bv[h].exists(int'(IDX_W'(murmur3_32(k, h))))) return 0;
    return 1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ev_conflict) n_conf++;
    if (ev_ratelimit) n_rate++;
    if (ev_full) n_full++;
    for (int s = 0; s < S; s++) begin
      if (r_valid[s] && r_ready[s]) begin
        exp_t e;
        check(expq[s].size() > 0, "result expected");
        if (expq[s].size() > 0) begin
          e = expq[s].pop_front();
          check(r_hit[s][0] == e.e0 && r_hit[s][1] == e.e1, $sformatf("stream %0d answers", s));
          if (e.must0) check(r_hit[s][0], "inserted key found");
          if (e.must1) check(r_hit[s][1], "inserted key found");
          if (!e.must0) begin n_rand++; if (r_hit[s][0]) n_fp++; end
          n_results++;
        end
      end
      if (q_valid[s] && q_ready[s])
        expq[s].push_back('{model_query(q_key[s][0]), model_query(q_key[s][1]), m0[s], m1[s]});
    end
  end

  function automatic bit [31:0] pick(output bit must);
    must = ($urandom_range(0, 3) == 0);
    if (must) return inserted[$urandom_range(0, inserted.size() - 1)];
    return $urandom;
  endfunction

  // send nq query pairs per stream; stream 5 offers a pair with
  // probability slow_pct percent per cycle; returns the cycles taken
  task automatic run(int nq, int slow_pct, output int cycles);
    int left [S];
    for (int s = 0; s < S; s++) left[s] = nq;
    cycles = 0;
    while (1) begin
      bit any;
      any = 0;
      for (int s = 0; s < S; s++) if (q_valid[s] && q_ready[s]) left[s]--;
      @(negedge clk);
      cycles++;
      for (int s = 0; s < S; s++) begin
        if (!(q_valid[s] && !q_ready[s])) begin
          q_valid[s]  = (left[s] > 0) && (s != 5 || $urandom_range(0, 99) < slow_pct);
          q_key[s][0] = pick(m0[s]);
          q_key[s][1] = pick(m1[s]);
        end
        if (left[s] > 0 || expq[s].size() > 0) any = 1;
      end
      if (!any) break;
      #1;
    end
  endtask

  initial begin
    int n, t_start, stall0;
    clr_start = 0; ins_valid = 0; ins_key = 0;
    for (int s = 0; s < S; s++) begin q_valid[s] = 0; q_key[s][0] = 0; q_key[s][1] = 0; r_ready[s] = 1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    clr_start = 1;
    @(negedge clk);
    clr_start = 0;
    n = 0;
    while (busy) begin n++; @(negedge clk); end
    check(n == (1 << IDX_W) / P / WORD_W, $sformatf("clear sweep %0d cycles", n));
    for (int i = 0; i < NINS; i++) begin
      ins_valid = 1; ins_key = $urandom;
      #1;
      while (!ins_ready) begin @(negedge clk); #1; end
      inserted.push_back(ins_key);
      for (int h = 0; h < H; h++) bv[h][int'(IDX_W'(murmur3_32(ins_key, h)))] = 1;
      @(negedge clk);
    end
    ins_valid = 0;
    while (!ins_idle) @(negedge clk);
    // phase 1: all streams at full rate; measure the sustained rate
    t_start = n_results;
    run(NQ, 100, n);
    check(n_results - t_start == S * NQ, "all query pairs answered");
    $display("queries: %0d in %0d cycles = %0.2f per cycle (ideal %0d)",
             2 * S * NQ, n, real'(2 * S * NQ) / n, 2 * S);
    check(real'(2 * S * NQ) / n > real'(S), "sustained rate above half of 2*S");
    // phase 2: stream 5 delivers only a quarter of the time; the others
    // are held within D of it by the ratelimit
    stall0 = n_rate;
    t_start = n_results;
    run(NQ / 2, 25, n);
    check(n_results - t_start == S * NQ / 2, "all query pairs answered with a slow stream");
    check(n_rate > stall0, "ratelimit pauses happened");
    check(n_conf > 0, "conflicts happened");
    $display("cycles with an arbiter stall event: conflict=%0d full=%0d ratelimit=%0d",
             n_conf, n_full, n_rate);
    $display("random keys: %0d, false positives: %0d", n_rand, n_fp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
