// unshuffle: partition-to-stream reorder stage of one bit-vector section.
//
// Lookup results leave the P partitions of a section in arbitration order:
// inside one partition, the items of different streams are interleaved and
// one stream can be several items ahead of another. The unshuffle turns
// this back into S in-order result streams.
//
// How it works: value_buf holds, for every (partition, stream) pair, a
// small queue of up to D results (P x S x D entries in all). Each cycle
// every partition input whose head item's queue has room is accepted into
// that queue. Then, for every stream, the heads of its P queues are
// compared with the sequence number the stream expects next; since a
// stream's items reach any one partition in order, the expected item, if it
// has arrived, is at the head of exactly one of them, so no priority logic
// is needed. It is sent when that stream's output is ready, and the
// expected number advances. An input stalls only when its target queue is
// full; with D matched to the arbiter's ratelimit distance this keeps a
// fast stream from blocking a slow one behind it in a partition FIFO.
//
// Interface: per partition in_valid/in_ready with hit bit, stream ID and
// sequence number; per stream out_valid/out_ready/out_hit. in_ready looks
// at the queue fill at the start of the cycle only. A result can leave in
// the cycle after it arrives.
//
// Follows the published BitBlender design: the P x S x D value buffer, the per-stream search over
// partitions, the release on output. This design's choice: the sequence
// number carried with every item to recognise the next one.
module unshuffle #(
  parameter int unsigned S     = 6,
  parameter int unsigned P     = 8,
  parameter int unsigned D     = 16,
  parameter int unsigned SEQ_W = 10,
  localparam int unsigned SID_W = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned QP_W  = (D > 1) ? $clog2(D) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid  [P],
  output logic             in_ready  [P],
  input  logic             in_hit    [P],
  input  logic [SID_W-1:0] in_stream [P],
  input  logic [SEQ_W-1:0] in_seq    [P],
  output logic             out_valid [S],
  input  logic             out_ready [S],
  output logic             out_hit   [S]
);
  // value_buf: one queue of D entries per (partition, stream)
  logic             vb_hit [P][S][D];
  logic [SEQ_W-1:0] vb_seq [P][S][D];
  logic [QP_W-1:0]  vb_rp  [P][S];
  logic [QP_W-1:0]  vb_wp  [P][S];
  logic [QP_W:0]    vb_cnt [P][S];
  logic [SEQ_W-1:0] next_seq [S];

  logic             push [P];
  logic             pop  [P][S];
  logic [$clog2(P+1)-1:0] src [S];   // partition holding the next item

  function automatic logic [QP_W-1:0] qinc(input logic [QP_W-1:0] x);
    return (x == QP_W'(D - 1)) ? '0 : x + 1'b1;
  endfunction

  always_comb begin
    for (int p = 0; p < P; p++) begin
      in_ready[p] = (vb_cnt[p][in_stream[p]] < (QP_W+1)'(D));
      push[p]     = in_valid[p] && in_ready[p];
    end
    for (int s = 0; s < S; s++) begin
      out_valid[s] = 1'b0;
      out_hit[s]   = 1'b0;
      src[s]       = '0;
      for (int p = 0; p < P; p++) begin
        pop[p][s] = 1'b0;
        if (vb_cnt[p][s] != '0 && vb_seq[p][s][vb_rp[p][s]] == next_seq[s]) begin
          out_valid[s] = 1'b1;
          out_hit[s]   = vb_hit[p][s][vb_rp[p][s]];
          src[s]       = ($clog2(P+1))'(p);
        end
      end
      for (int p = 0; p < P; p++)
        pop[p][s] = out_valid[s] && out_ready[s] && (src[s] == ($clog2(P+1))'(p));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < S; s++) next_seq[s] <= '0;
      for (int p = 0; p < P; p++)
        for (int s = 0; s < S; s++) begin
          vb_rp[p][s]  <= '0;
          vb_wp[p][s]  <= '0;
          vb_cnt[p][s] <= '0;
        end
    end else begin
      for (int s = 0; s < S; s++)
        if (out_valid[s] && out_ready[s]) next_seq[s] <= next_seq[s] + 1'b1;
      for (int p = 0; p < P; p++)
        for (int s = 0; s < S; s++) begin
          logic pu;
          pu = push[p] && (in_stream[p] == SID_W'(s));
          if (pu)        vb_wp[p][s] <= qinc(vb_wp[p][s]);
          if (pop[p][s]) vb_rp[p][s] <= qinc(vb_rp[p][s]);
          vb_cnt[p][s] <= vb_cnt[p][s] + (QP_W+1)'(pu) - (QP_W+1)'(pop[p][s]);
        end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < P; p++)
      if (push[p]) begin
        vb_hit[p][in_stream[p]][vb_wp[p][in_stream[p]]] <= in_hit[p];
        vb_seq[p][in_stream[p]][vb_wp[p][in_stream[p]]] <= in_seq[p];
      end
  end

  // an item for a stream that does not exist is a wiring error
  for (genvar p = 0; p < P; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     in_valid[p] |-> (int'(in_stream[p]) < S))
      else $error("unshuffle: stream ID out of range");
  end

endmodule
