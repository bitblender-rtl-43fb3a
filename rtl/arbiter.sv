// arbiter: stream-to-partition arbiter of one bit-vector section.
//
// S streams each deliver hashed indices into this section; the section is
// split into P partitions by the top LOG2P index bits, and each partition
// can take one lookup per cycle. Every cycle the arbiter hands each
// partition at most one index, so that indices aimed at different
// partitions go in parallel and indices aimed at the same partition go one
// after another.
//
// How it works:
//  * One buffer register per stream (idx_buf) holds an index that could not
//    be sent yet; a stream is read only while its buffer is empty. A freshly
//    read index is offered in the same cycle it arrives, so a stream that is
//    never blocked moves one index per cycle.
//  * Per partition, a priority encoder picks one of the streams whose
//    offered index falls in that partition. The search starts at the slowest
//    stream (fewest indices sent so far, lowest ID on a tie) and goes up in
//    stream ID, wrapping around.
//  * Ratelimit: the arbiter counts the indices sent per stream. A stream
//    whose count is more than D ahead of the slowest stream's count is not
//    offered, so no stream runs more than D items ahead of another. This is
//    what keeps the downstream unshuffle/aggregate stages free of deadlock.
//  * The chosen index leaves on partition p's output when out_ready[p] is
//    high; only then is its buffer freed and its stream's count advanced.
//
// Interface: per stream in_valid/in_ready/in_idx; per partition
// out_valid/out_ready with the address inside the partition, the stream ID
// and the stream's sequence number (the count modulo 2**SEQ_W), which the
// unshuffle uses to put results back in order. out_valid does not depend
// on out_ready. Zero-cycle path from input to output; the FIFOs around it
// provide the registers. The ev_* outputs flag, per cycle, that some
// offered stream was held by a conflict, a full output, or the ratelimit.
//
// Follows the published BitBlender design: the buffer-per-stream structure, the per-partition
// priority encoder, the slowest-first priority, the ratelimit with distance
// D. This design's choices: the partition is the top index bits, a
// stream's "location" is its count of sent indices, distance = own count
// minus the slowest count, and a stream may send while that is at most D.
module arbiter #(
  parameter int unsigned S     = 6,
  parameter int unsigned P     = 8,
  parameter int unsigned D     = 16,
  parameter int unsigned IDX_W = 24,
  parameter int unsigned SEQ_W = 10,
  localparam int unsigned LOG2P  = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned ADDR_W = IDX_W - LOG2P,
  localparam int unsigned SID_W  = (S > 1) ? $clog2(S) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // per stream
  input  logic              in_valid [S],
  output logic              in_ready [S],
  input  logic [IDX_W-1:0]  in_idx   [S],
  // per partition
  output logic              out_valid  [P],
  input  logic              out_ready  [P],
  output logic [ADDR_W-1:0] out_addr   [P],
  output logic [SID_W-1:0]  out_stream [P],
  output logic [SEQ_W-1:0]  out_seq    [P],
  // per-cycle events
  output logic              ev_conflict,
  output logic              ev_full,
  output logic              ev_ratelimit
);
  logic              buf_valid [S];
  logic [IDX_W-1:0]  buf_idx   [S];
  logic [SEQ_W-1:0]  cnt       [S];

  logic              cand_valid [S];
  logic [IDX_W-1:0]  cand_idx   [S];
  logic [LOG2P-1:0]  cand_part  [S];
  logic              rate_ok    [S];
  logic              offer      [S];
  logic              granted    [S];
  logic [SID_W-1:0]  slow;
  logic              sel_found  [P];
  logic [SID_W-1:0]  sel        [P];

  // signed distance a - b between two wrapping counters
  function automatic logic signed [SEQ_W-1:0] cdiff(input logic [SEQ_W-1:0] a,
                                                    input logic [SEQ_W-1:0] b);
    return $signed(a - b);
  endfunction

  always_comb begin
    // offered index of each stream: buffered one, else the one arriving now
    for (int s = 0; s < S; s++) begin
      cand_valid[s] = buf_valid[s] || in_valid[s];
      cand_idx[s]   = buf_valid[s] ? buf_idx[s] : in_idx[s];
      if (P > 1) cand_part[s] = cand_idx[s][IDX_W-1 -: LOG2P];
      else       cand_part[s] = '0;
      in_ready[s]   = !buf_valid[s];
    end

    // slowest stream: smallest count, lowest ID on a tie
    slow = '0;
    for (int s = 1; s < S; s++)
      if (cdiff(cnt[s], cnt[slow]) < 0) slow = SID_W'(s);

    // ratelimit: own count minus slowest count must not exceed D
    for (int s = 0; s < S; s++) begin
      rate_ok[s] = (cdiff(cnt[s], cnt[slow]) <= $signed(SEQ_W'(D)));
      offer[s]   = cand_valid[s] && rate_ok[s];
    end

    // one priority encoder per partition, starting at the slowest stream
    for (int p = 0; p < P; p++) begin
      sel_found[p] = 1'b0;
      sel[p]       = '0;
      for (int k = 0; k < S; k++) begin
        int unsigned s;
        s = int'(slow) + k;
        if (s >= S) s = s - S;
        if (!sel_found[p] && offer[s] && (cand_part[s] == LOG2P'(p))) begin
          sel_found[p] = 1'b1;
          sel[p]       = SID_W'(s);
        end
      end
      out_valid[p]  = sel_found[p];
      out_addr[p]   = cand_idx[sel[p]][ADDR_W-1:0];
      out_stream[p] = sel[p];
      out_seq[p]    = cnt[sel[p]];
    end

    for (int s = 0; s < S; s++) begin
      granted[s] = 1'b0;
      for (int p = 0; p < P; p++)
        if (sel_found[p] && out_ready[p] && (sel[p] == SID_W'(s))) granted[s] = 1'b1;
    end

    ev_conflict  = 1'b0;
    ev_full      = 1'b0;
    ev_ratelimit = 1'b0;
    for (int s = 0; s < S; s++) begin
      if (cand_valid[s] && !rate_ok[s]) ev_ratelimit = 1'b1;
      if (offer[s] && !granted[s]) begin
        if (sel[cand_part[s]] != SID_W'(s)) ev_conflict = 1'b1;
        else                                ev_full     = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < S; s++) begin
        buf_valid[s] <= 1'b0;
        cnt[s]       <= '0;
      end
    end else begin
      for (int s = 0; s < S; s++) begin
        if (granted[s]) begin
          buf_valid[s] <= 1'b0;
          cnt[s]       <= cnt[s] + 1'b1;
        end else if (!buf_valid[s] && in_valid[s]) begin
          buf_valid[s] <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < S; s++)
      if (!buf_valid[s] && in_valid[s]) buf_idx[s] <= in_idx[s];
  end

  // a granted stream must really have offered something
  for (genvar s = 0; s < S; s++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) granted[s] |-> offer[s])
      else $error("arbiter: grant without offer");
  end

endmodule
