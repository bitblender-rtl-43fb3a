// tb_bitblender_top: end-to-end test of the accelerator at reduced sizes
// (S=3 streams, H=3 sections, P=4 partitions, D=4, 4096 bits per section,
// 16-bit words, FIFO depth 2) so that conflicts, full FIFOs and ratelimit
// pauses are frequent.
//
// It clears the bit-vector, inserts keys, then streams query pairs on all
// streams: half are inserted keys (the answer must be 1: a Bloom filter has
// no false negatives), half random keys. Every answer is compared with a
// model that hashes the key with the reference MurmurHash3 and ANDs the
// model bits. Counted mechanisms, each of which must occur: clear, insert,
// partition conflict, full partition FIFO, ratelimit pause, out-of-order
// arrival at an unshuffle, input backpressure (q_ready low) and output
// backpressure (r_ready low). Also checks the minimum query latency.
module tb_bitblender_top;
  import tb_ref_pkg::*;
  localparam int S = 3, H = 3, P = 4, D = 4, IDX_W = 12, WORD_W = 16, FD = 2, SEQ_W = 8;
  localparam int NQ = 2000;    // query pairs per stream

  logic clk = 0, rst_n = 0;
  logic        q_valid [S], q_ready [S];
  logic [31:0] q_key   [S][2];
  logic        r_valid [S], r_ready [S], r_hit [S][2];
  logic        ins_valid, ins_ready, ins_idle, clr_start, busy;
  logic [31:0] ins_key;
  logic        ev_conflict, ev_full, ev_ratelimit;

  int checks = 0, failures = 0;
  int n_clear = 0, n_insert = 0, n_conf = 0, n_full = 0, n_rate = 0, n_ooo = 0;
  int n_inbp = 0, n_outbp = 0, n_fp = 0, n_neg = 0;
  bit bv [H][1 << IDX_W];
  bit [31:0] inserted [$];
  typedef struct { bit e0, e1; bit must0, must1; } exp_t;
  exp_t expq [S][$];
  bit m0 [S], m1 [S];   // keys on q_key are inserted ones

  bitblender_top #(.S(S), .H(H), .P(P), .D(D), .IDX_W(IDX_W), .WORD_W(WORD_W),
                   .FIFO_DEPTH(FD), .SEQ_W(SEQ_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit model_query(bit [31:0] k);
    bit r;
    r = 1;
    for (int h = 0; h < H; h++) r &= bv[h][IDX_W'(murmur3_32(k, h))];
    return r;
  endfunction

  // out-of-order arrivals at the unshuffle of section 0, lane 0
  logic [SEQ_W-1:0] us_next [S];
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < P; p++)
      if (dut.g_section[0].u_section.g_lane[0].u_unshuffle.in_valid[p] &&
          dut.g_section[0].u_section.g_lane[0].u_unshuffle.in_ready[p] &&
          dut.g_section[0].u_section.g_lane[0].u_unshuffle.in_seq[p] !=
          dut.g_section[0].u_section.g_lane[0].u_unshuffle.next_seq[
            dut.g_section[0].u_section.g_lane[0].u_unshuffle.in_stream[p]])
        n_ooo++;
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_conflict) n_conf++;
    if (ev_full) n_full++;
    if (ev_ratelimit) n_rate++;
    if (ins_valid && ins_ready) n_insert++;
    for (int s = 0; s < S; s++) begin
      if (q_valid[s] && !q_ready[s]) n_inbp++;
      if (r_valid[s] && !r_ready[s]) n_outbp++;
      if (r_valid[s] && r_ready[s]) begin
        exp_t e;
        check(expq[s].size() > 0, "result expected");
        if (expq[s].size() > 0) begin
          e = expq[s].pop_front();
          check(r_hit[s][0] == e.e0 && r_hit[s][1] == e.e1, $sformatf("stream %0d answers", s));
          if (e.must0) check(r_hit[s][0], "inserted key found (first of pair)");
          if (e.must1) check(r_hit[s][1], "inserted key found (second of pair)");
          if (!e.must0) begin if (r_hit[s][0]) n_fp++; else n_neg++; end
        end
      end
      if (q_valid[s] && q_ready[s])
        expq[s].push_back('{model_query(q_key[s][0]), model_query(q_key[s][1]), m0[s], m1[s]});
    end
  end

  function automatic bit [31:0] pick(output bit must);
    must = ($urandom_range(0, 1) == 1);
    if (must) return inserted[$urandom_range(0, inserted.size() - 1)];
    return $urandom;
  endfunction

  function automatic bit pending();
    for (int s = 0; s < S; s++) if (expq[s].size() > 0) return 1;
    return 0;
  endfunction

  initial begin
    int n, lat, left [S];
    clr_start = 0; ins_valid = 0; ins_key = 0;
    for (int s = 0; s < S; s++) begin q_valid[s] = 0; q_key[s][0] = 0; q_key[s][1] = 0; r_ready[s] = 1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // clear
    clr_start = 1;
    @(negedge clk);
    clr_start = 0;
    n = 0;
    while (busy) begin n++; @(negedge clk); end
    n_clear++;
    check(n == (1 << IDX_W) / P / WORD_W, "clear sweep length");
    for (int h = 0; h < H; h++) for (int i = 0; i < (1 << IDX_W); i++) bv[h][i] = 0;
    // insert 150 keys
    for (int i = 0; i < 150; i++) begin
      ins_valid = 1; ins_key = $urandom;
      #1;
      while (!ins_ready) begin @(negedge clk); #1; end
      inserted.push_back(ins_key);
      for (int h = 0; h < H; h++) bv[h][IDX_W'(murmur3_32(ins_key, h))] = 1;
      @(negedge clk);
    end
    ins_valid = 0;
    while (!ins_idle) @(negedge clk);
    // minimum latency of one query pair on stream 0
    q_valid[0] = 1; q_key[0][0] = inserted[0]; q_key[0][1] = inserted[1];
    m0[0] = 1; m1[0] = 1;
    @(negedge clk);
    q_valid[0] = 0;
    lat = 1;
    while (!r_valid[0] && lat < 100) begin lat++; @(negedge clk); end
    check(lat == 12, $sformatf("minimum latency %0d cycles, expected 12", lat));
    check(r_hit[0][0] && r_hit[0][1], "inserted pair found");
    @(negedge clk);
    // streaming queries
    for (int s = 0; s < S; s++) left[s] = NQ;
    for (int cyc = 0; cyc < 200000; cyc++) begin
      bit any;
      any = 0;
      for (int s = 0; s < S; s++) begin
        if (q_valid[s] && q_ready[s]) left[s]--;
      end
      @(negedge clk);
      for (int s = 0; s < S; s++) begin
        if (!(q_valid[s] && !q_ready[s])) begin
          q_valid[s]  = (left[s] > 0) && ($urandom_range(0, 99) < 95);
          q_key[s][0] = pick(m0[s]);
          q_key[s][1] = pick(m1[s]);
        end
        r_ready[s] = ($urandom_range(0, 99) < (((cyc / 300) % 3 == 0) ? 40 : 98));
        if (left[s] > 0) any = 1;
      end
      if (!any && !pending()) break;
      #1;
    end
    for (int s = 0; s < S; s++) check(left[s] == 0, "all queries sent");
    check(!pending(), "all answers received");
    check(n_clear > 0, "clear happened");
    check(n_insert > 0, "inserts happened");
    check(n_conf > 0, "partition conflicts happened");
    check(n_full > 0, "full partition FIFOs happened");
    check(n_rate > 0, "ratelimit pauses happened");
    check(n_ooo > 0, "out-of-order unshuffle arrivals happened");
    check(n_inbp > 0, "input backpressure happened");
    check(n_outbp > 0, "output backpressure happened");
    check(n_neg > 0, "negative answers happened");
    $display("events: clear=%0d insert=%0d conflict=%0d full=%0d ratelimit=%0d ooo=%0d in_bp=%0d out_bp=%0d false_pos=%0d neg=%0d",
             n_clear, n_insert, n_conf, n_full, n_rate, n_ooo, n_inbp, n_outbp, n_fp, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
