// tb_hash_section: one section at S=3 streams, P=4 partitions, D=3, 1024
// bits in 16-bit words. Clears the section (checking the sweep length),
// inserts random bits, then sends random indices on both lanes of all
// streams with random gaps and random result stalls; every result must come
// back on its own lane and stream, in order, equal to the inserted-bit
// model. Checks the minimum latency, and that conflicts, full partition
// FIFOs and ratelimit pauses all occurred.
module tb_hash_section;
  localparam int S = 3, P = 4, D = 3, IDX_W = 10, WORD_W = 16, FD = 2, SEQ_W = 8;
  logic clk = 0, rst_n = 0;
  logic clr_start, busy, ins_valid, ins_ready;
  logic [IDX_W-1:0] ins_idx;
  logic idx_valid [2][S], idx_ready [2][S];
  logic [IDX_W-1:0] idx [2][S];
  logic res_valid [2][S], res_ready [2][S], res_hit [2][S];
  logic ev_conflict, ev_full, ev_ratelimit;

  int checks = 0, failures = 0, n_c = 0, n_f = 0, n_r = 0;
  bit model [1 << IDX_W];
  bit expq [2][S][$];

  hash_section #(.S(S), .P(P), .D(D), .IDX_W(IDX_W), .WORD_W(WORD_W),
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_conflict) n_c++;
    if (ev_full) n_f++;
    if (ev_ratelimit) n_r++;
    for (int l = 0; l < 2; l++)
      for (int s = 0; s < S; s++) begin
        if (res_valid[l][s] && res_ready[l][s]) begin
          check(expq[l][s].size() > 0 && res_hit[l][s] == expq[l][s][0],
                $sformatf("lane %0d stream %0d result", l, s));
          if (expq[l][s].size() > 0) void'(expq[l][s].pop_front());
        end
        if (idx_valid[l][s] && idx_ready[l][s]) expq[l][s].push_back(model[idx[l][s]]);
      end
    if (ins_valid && ins_ready) model[ins_idx] = 1;
  end

  function automatic bit pending();
    for (int l = 0; l < 2; l++) for (int s = 0; s < S; s++) if (expq[l][s].size() > 0) return 1;
    return 0;
  endfunction

  initial begin
    int n, left [2][S];
    clr_start = 0; ins_valid = 0; ins_idx = 0;
    for (int l = 0; l < 2; l++) for (int s = 0; s < S; s++) begin
      idx_valid[l][s] = 0; idx[l][s] = 0; res_ready[l][s] = 1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    clr_start = 1;
    @(negedge clk);
    clr_start = 0;
    n = 0;
    while (busy) begin n++; @(negedge clk); end
    check(n == (1 << IDX_W) / P / WORD_W, $sformatf("clear sweep %0d cycles", n));
    for (int i = 0; i < 300; i++) begin
      ins_valid = 1; ins_idx = IDX_W'($urandom);
      @(negedge clk);
    end
    ins_valid = 0;
    // minimum latency: one index on lane 0 stream 0
    idx_valid[0][0] = 1; idx[0][0] = 10'h155;
    @(negedge clk);
    idx_valid[0][0] = 0;
    n = 1;
    while (!res_valid[0][0] && n < 50) begin n++; @(negedge clk); end
    check(n == 6, $sformatf("minimum latency %0d cycles, expected 6", n));
    @(negedge clk);
    // random traffic
    for (int l = 0; l < 2; l++) for (int s = 0; s < S; s++) left[l][s] = 3000;
    for (int cyc = 0; cyc < 40000; cyc++) begin
      bit any;
      any = 0;
      for (int l = 0; l < 2; l++) for (int s = 0; s < S; s++) begin
        if (idx_valid[l][s] && idx_ready[l][s]) left[l][s]--;
      end
      @(negedge clk);
      for (int l = 0; l < 2; l++) for (int s = 0; s < S; s++) begin
        idx_valid[l][s] = (left[l][s] > 0) && ($urandom_range(0, 99) < ((s == 1) ? 40 : 90));
        idx[l][s]       = IDX_W'($urandom);
        res_ready[l][s] = ($urandom_range(0, 99) < (((cyc / 500) % 2) ? 95 : 50));
        if (left[l][s] > 0) any = 1;
      end
      if (!any && !pending()) break;
      #1;
    end
    for (int l = 0; l < 2; l++) for (int s = 0; s < S; s++) check(left[l][s] == 0, "all indices sent");
    check(!pending(), "all results returned");
    check(n_c > 0, "conflicts seen");
    check(n_f > 0, "full partition FIFOs seen");
    check(n_r > 0, "ratelimit pauses seen");
    $display("events: conflict=%0d full=%0d ratelimit=%0d", n_c, n_f, n_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
