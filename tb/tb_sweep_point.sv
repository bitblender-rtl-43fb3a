// tb_sweep_point: one measurement point for tb_bitblender_sweep. It builds
// an accelerator with the given S, P and D (one section of 2**14 bits),
// clears it, inserts 64 keys, then sends NQ query pairs on every stream at
// full rate with the outputs always ready. Half of the keys are inserted
// ones; every answer is checked against a reference model. When finished it
// raises done and reports the sustained queries per cycle.
module tb_sweep_point #(
  parameter int S = 6,
  parameter int P = 8,
  parameter int D = 16,
  parameter int NQ = 600
) (
  input  logic clk,
  output bit   done,
  output real  rate,
  output int   checks,
  output int   failures
);
  import tb_ref_pkg::*;
  localparam int H = 1, IDX_W = 14;

  logic        rst_n = 0;
  logic        q_valid [S], q_ready [S];
  logic [31:0] q_key   [S][2];
  logic        r_valid [S], r_ready [S], r_hit [S][2];
  logic        ins_valid, ins_ready, ins_idle, clr_start, busy;
  logic [31:0] ins_key;
  logic        ev_conflict, ev_full, ev_ratelimit;

  bit bv [H][int];
  bit [31:0] inserted [$];
  bit expq [S][$];
  int n_results = 0;

  bitblender_top #(.S(S), .H(H), .P(P), .D(D), .IDX_W(IDX_W)) dut (.*);

  function automatic bit model_query(bit [31:0] k);
    for (int h = 0; h < H; h++)
      if (!bv[h].exists(int'(IDX_W'(murmur3_32(k, h))))) return 0;
    return 1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < S; s++) begin
      if (r_valid[s] && r_ready[s]) begin
        bit e0, e1;
        checks++;
        e0 = expq[s].pop_front();
        e1 = expq[s].pop_front();
        if (r_hit[s][0] != e0 || r_hit[s][1] != e1) failures++;
        n_results++;
      end
      if (q_valid[s] && q_ready[s]) begin
        expq[s].push_back(model_query(q_key[s][0]));
        expq[s].push_back(model_query(q_key[s][1]));
      end
    end
  end

  function automatic bit [31:0] pick();
    if ($urandom_range(0, 1) == 1) return inserted[$urandom_range(0, inserted.size() - 1)];
    return $urandom;
  endfunction

  initial begin
    int left [S], cycles;
    done = 0; rate = 0.0; checks = 0; failures = 0;
    clr_start = 0; ins_valid = 0; ins_key = 0;
    for (int s = 0; s < S; s++) begin q_valid[s] = 0; q_key[s][0] = 0; q_key[s][1] = 0; r_ready[s] = 1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    clr_start = 1;
    @(negedge clk);
    clr_start = 0;
    while (busy) @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      ins_valid = 1; ins_key = $urandom;
      #1;
      while (!ins_ready) begin @(negedge clk); #1; end
      inserted.push_back(ins_key);
      for (int h = 0; h < H; h++) bv[h][int'(IDX_W'(murmur3_32(ins_key, h)))] = 1;
      @(negedge clk);
    end
    ins_valid = 0;
    while (!ins_idle) @(negedge clk);
    for (int s = 0; s < S; s++) left[s] = NQ;
    cycles = 0;
    while (1) begin
      bit any;
      any = 0;
      for (int s = 0; s < S; s++) if (q_valid[s] && q_ready[s]) left[s]--;
      @(negedge clk);
      cycles++;
      for (int s = 0; s < S; s++) begin
        if (!(q_valid[s] && !q_ready[s])) begin
          q_valid[s]  = (left[s] > 0);
          q_key[s][0] = pick();
          q_key[s][1] = pick();
        end
        if (left[s] > 0 || expq[s].size() > 0) any = 1;
      end
      if (!any) break;
      #1;
    end
    checks++;
    if (n_results != S * NQ) failures++;
    rate = real'(2 * S * NQ) / cycles;
    done = 1;
  end
endmodule
