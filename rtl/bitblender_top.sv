// bitblender_top: multi-stream Bloom filter query accelerator.
//
// S input streams each deliver a pair of 32-bit query keys per cycle; for
// each key the accelerator answers whether it may be in the set (1) or is
// certainly not (0). All streams share one bit-vector of H * 2**IDX_W bits,
// split into H sections (one per hash function) of P partitions each.
//
// Datapath, per stream and per query of the pair (a "lane"):
//   compute_hash (H MurmurHash3 indices)
//   -> one index into each of the H hash_section blocks
//      (FIFO, arbiter, partition RAM, unshuffle, FIFO)
//   -> aggregate (AND of the H lookup bits) -> result.
// Inside each section the arbiters let streams that target different
// partitions proceed in parallel and serialise streams that collide; the
// unshuffles restore every stream's order; the ratelimit distance D keeps
// the streams close enough together that the H sections cannot deadlock
// each other through the aggregates.
//
// Interface (all valid/ready, a transfer when both are high):
//   q_*   per stream, one query pair; accepted when both lanes have room.
//   r_*   per stream, the pair of results, in the order of the queries.
//   ins_* one key to insert: its H bits are set. ins_idle is high when no
//         insert is still on its way; wait for it before querying.
//   clr_start clears the whole bit-vector (2**IDX_W / P / WORD_W cycles);
//         busy is high meanwhile and nothing else is accepted.
//   ev_conflict / ev_full / ev_ratelimit: per cycle, some arbiter held an
//         index because of a partition conflict, a full partition FIFO, or
//         the ratelimit.
// Every stream must carry the same number of queries: the ratelimit holds
// each stream within D items of the slowest one, so a stream that stops
// sending stops the others too after D items. Minimum query latency is 12
// cycles (5 hash, 6 section, 1 aggregate).
//
// Default sizes are the published main configuration: S = 6 streams,
// H = 9 hash functions, P = 8 partitions, D = 16, 16 Mbit per section
// (144 Mbit in all). Word width, FIFO depth, the sequence-number width and
// the insert/clear path are this design's choices.
module bitblender_top #(
  parameter int unsigned S          = 6,
  parameter int unsigned H          = 9,
  parameter int unsigned P          = 8,
  parameter int unsigned D          = 16,
  parameter int unsigned IDX_W      = 24,
  parameter int unsigned WORD_W     = 64,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned SEQ_W      = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // queries
  input  logic        q_valid [S],
  output logic        q_ready [S],
  input  logic [31:0] q_key   [S][2],
  // results
  output logic        r_valid [S],
  input  logic        r_ready [S],
  output logic        r_hit   [S][2],
  // building the filter
  input  logic        ins_valid,
  output logic        ins_ready,
  input  logic [31:0] ins_key,
  output logic        ins_idle,
  input  logic        clr_start,
  output logic        busy,
  // events
  output logic        ev_conflict,
  output logic        ev_full,
  output logic        ev_ratelimit
);
  // section side of the index/result channels, [section][lane][stream]
  logic             sec_idx_valid [H][2][S];
  logic             sec_idx_ready [H][2][S];
  logic [IDX_W-1:0] sec_idx       [H][2][S];
  logic             sec_res_valid [H][2][S];
  logic             sec_res_ready [H][2][S];
  logic             sec_res_hit   [H][2][S];
  logic             sec_busy      [H];
  logic             sec_ins_ready [H];
  logic             sec_ev_c [H], sec_ev_f [H], sec_ev_r [H];

  // query hash and aggregate side, [stream][lane]
  logic             ch_in_ready  [S][2];
  logic             ch_out_valid [S][2];
  logic             ch_out_ready [S][2];
  logic [IDX_W-1:0] ch_out_idx   [S][2][H];
  logic             agg_valid    [S][2];
  logic             agg_ready    [S][2];
  logic             agg_hit      [S][2];

  // insert hash
  logic             ih_valid, ih_ready, ih_fire, ih_in_ready;
  logic [IDX_W-1:0] ih_idx [H];
  logic [3:0]       ins_inflight;

  for (genvar s = 0; s < S; s++) begin : g_stream
    assign q_ready[s] = ch_in_ready[s][0] && ch_in_ready[s][1] && !busy;
    assign r_valid[s] = agg_valid[s][0] && agg_valid[s][1];

    for (genvar l = 0; l < 2; l++) begin : g_lane
      logic ag_in_valid [H];
      logic ag_in_ready [H];
      logic ag_in_hit   [H];

      compute_hash #(.H(H), .IDX_W(IDX_W)) u_hash (
        .clk, .rst_n,
        .in_valid (q_valid[s] && q_ready[s]), .in_ready(ch_in_ready[s][l]),
        .in_key   (q_key[s][l]),
        .out_valid(ch_out_valid[s][l]), .out_ready(ch_out_ready[s][l]),
        .out_idx  (ch_out_idx[s][l])
      );

      // an index set goes to all H sections in the same cycle
      always_comb begin
        ch_out_ready[s][l] = 1'b1;
        for (int h = 0; h < H; h++)
          ch_out_ready[s][l] = ch_out_ready[s][l] && sec_idx_ready[h][l][s];
      end

      for (genvar h = 0; h < H; h++) begin : g_sec
        assign sec_idx_valid[h][l][s] = ch_out_valid[s][l] && ch_out_ready[s][l];
        assign sec_idx[h][l][s]       = ch_out_idx[s][l][h];
        assign ag_in_valid[h]         = sec_res_valid[h][l][s];
        assign ag_in_hit[h]           = sec_res_hit[h][l][s];
        assign sec_res_ready[h][l][s] = ag_in_ready[h];
      end

      aggregate #(.H(H)) u_agg (
        .clk, .rst_n,
        .in_valid(ag_in_valid), .in_ready(ag_in_ready), .in_hit(ag_in_hit),
        .out_valid(agg_valid[s][l]), .out_ready(agg_ready[s][l]), .out_hit(agg_hit[s][l])
      );

      assign r_hit[s][l]     = agg_hit[s][l];
      assign agg_ready[s][l] = r_ready[s] && r_valid[s];
    end
  end

  for (genvar h = 0; h < H; h++) begin : g_section
    hash_section #(
      .S(S), .P(P), .D(D), .IDX_W(IDX_W), .WORD_W(WORD_W),
      .FIFO_DEPTH(FIFO_DEPTH), .SEQ_W(SEQ_W)
    ) u_section (
      .clk, .rst_n,
      .clr_start, .busy(sec_busy[h]),
      .ins_valid(ih_fire), .ins_ready(sec_ins_ready[h]), .ins_idx(ih_idx[h]),
      .idx_valid(sec_idx_valid[h]), .idx_ready(sec_idx_ready[h]), .idx(sec_idx[h]),
      .res_valid(sec_res_valid[h]), .res_ready(sec_res_ready[h]), .res_hit(sec_res_hit[h]),
      .ev_conflict(sec_ev_c[h]), .ev_full(sec_ev_f[h]), .ev_ratelimit(sec_ev_r[h])
    );
  end

  // insert path: hash once, set one bit in every section
  compute_hash #(.H(H), .IDX_W(IDX_W)) u_ins_hash (
    .clk, .rst_n,
    .in_valid (ins_valid && ins_ready), .in_ready(ih_in_ready),
    .in_key   (ins_key),
    .out_valid(ih_valid), .out_ready(ih_ready),
    .out_idx  (ih_idx)
  );

  always_comb begin
    busy         = 1'b0;
    ih_ready     = 1'b1;
    ev_conflict  = 1'b0;
    ev_full      = 1'b0;
    ev_ratelimit = 1'b0;
    for (int h = 0; h < H; h++) begin
      busy         = busy || sec_busy[h];
      ih_ready     = ih_ready && sec_ins_ready[h];
      ev_conflict  = ev_conflict || sec_ev_c[h];
      ev_full      = ev_full || sec_ev_f[h];
      ev_ratelimit = ev_ratelimit || sec_ev_r[h];
    end
  end

  assign ih_fire   = ih_valid && ih_ready;
  // the hash pipeline holds at most 5 keys; keep the count below 15
  assign ins_ready = !busy && ih_in_ready && (ins_inflight < 4'd8);
  assign ins_idle  = (ins_inflight == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) ins_inflight <= '0;
    else ins_inflight <= ins_inflight + 4'(ins_valid && ins_ready) - 4'(ih_fire);
  end

endmodule
