// hash_section: one of the H bit-vector sections. Every query of every
// stream sends exactly one hashed index to each section; the section looks
// the bit up and returns it, in the stream's own order.
//
// How it works: the section's 2**IDX_W bits are split into P partitions
// (top LOG2P index bits) of one query_bv each. Because every stream delivers
// a query pair per cycle, the section is built as two lanes: lane 0 carries
// the first query of each pair, lane 1 the second. Each lane has its own
// arbiter and unshuffle; the two lanes share the partitions, lane 0 on RAM
// port A and lane 1 on RAM port B. Per lane the path is
//   S input FIFOs -> arbiter -> P FIFOs -> query_bv -> P FIFOs
//   -> unshuffle -> S output FIFOs.
// Items carry their stream ID and sequence number from the arbiter to the
// unshuffle.
//
// Interface: idx_* (per lane and stream) in, res_* (per lane and stream)
// out, all valid/ready. ins_* sets one bit of the section (routed to the
// partition that holds it); clr_start clears the whole section, busy is
// high while that runs. ev_* are the OR of the arbiters' per-cycle events.
// Minimum latency from idx to res is 6 cycles (three FIFOs, the RAM
// output register, the unshuffle's value buffer and its output FIFO).
//
// Follows the published BitBlender design: arbiter, P QueryBV partitions and unshuffle per
// section, paired arbiter/unshuffle for the two queries of a pair, FIFOs
// between modules. This design's choices: FIFO depths, the tag format and
// the insert/clear path.
module hash_section #(
  parameter int unsigned S          = 6,
  parameter int unsigned P          = 8,
  parameter int unsigned D          = 16,
  parameter int unsigned IDX_W      = 24,
  parameter int unsigned WORD_W     = 64,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned SEQ_W      = 10,
  localparam int unsigned LOG2P  = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned ADDR_W = IDX_W - LOG2P,
  localparam int unsigned SID_W  = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned TAG_W  = SID_W + SEQ_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // bit-vector maintenance
  input  logic             clr_start,
  output logic             busy,
  input  logic             ins_valid,
  output logic             ins_ready,
  input  logic [IDX_W-1:0] ins_idx,
  // hashed indices, per lane and stream
  input  logic             idx_valid [2][S],
  output logic             idx_ready [2][S],
  input  logic [IDX_W-1:0] idx       [2][S],
  // lookup results, per lane and stream
  output logic             res_valid [2][S],
  input  logic             res_ready [2][S],
  output logic             res_hit   [2][S],
  // per-cycle events
  output logic             ev_conflict,
  output logic             ev_full,
  output logic             ev_ratelimit
);
  // arbiter -> partition FIFO -> query_bv -> result FIFO, per lane and partition
  logic              q_in_valid  [2][P];
  logic              q_in_ready  [2][P];
  logic [ADDR_W-1:0] q_in_addr   [2][P];
  logic [TAG_W-1:0]  q_in_tag    [2][P];
  logic              q_out_valid [2][P];
  logic              q_out_ready [2][P];
  logic              q_out_hit   [2][P];
  logic [TAG_W-1:0]  q_out_tag   [2][P];

  logic              wr_valid [P];
  logic              wr_ready [P];
  logic              p_busy   [P];
  logic              ev_c [2], ev_f [2], ev_r [2];
  logic [LOG2P-1:0]  ins_part;

  for (genvar l = 0; l < 2; l++) begin : g_lane
    logic              a_in_valid  [S];
    logic              a_in_ready  [S];
    logic [IDX_W-1:0]  a_in_idx    [S];
    logic              a_out_valid [P];
    logic              a_out_ready [P];
    logic [ADDR_W-1:0] a_out_addr  [P];
    logic [SID_W-1:0]  a_out_stream[P];
    logic [SEQ_W-1:0]  a_out_seq   [P];
    logic              u_in_valid  [P];
    logic              u_in_ready  [P];
    logic              u_in_hit    [P];
    logic [SID_W-1:0]  u_in_stream [P];
    logic [SEQ_W-1:0]  u_in_seq    [P];
    logic              u_out_valid [S];
    logic              u_out_ready [S];
    logic              u_out_hit   [S];

    for (genvar s = 0; s < S; s++) begin : g_in
      stream_fifo #(.WIDTH(IDX_W), .DEPTH(FIFO_DEPTH)) u_fifo (
        .clk, .rst_n,
        .in_valid (idx_valid[l][s]), .in_ready (idx_ready[l][s]), .in_data (idx[l][s]),
        .out_valid(a_in_valid[s]),   .out_ready(a_in_ready[s]),   .out_data(a_in_idx[s])
      );
    end

    arbiter #(.S(S), .P(P), .D(D), .IDX_W(IDX_W), .SEQ_W(SEQ_W)) u_arb (
      .clk, .rst_n,
      .in_valid (a_in_valid), .in_ready(a_in_ready), .in_idx(a_in_idx),
      .out_valid(a_out_valid), .out_ready(a_out_ready), .out_addr(a_out_addr),
      .out_stream(a_out_stream), .out_seq(a_out_seq),
      .ev_conflict(ev_c[l]), .ev_full(ev_f[l]), .ev_ratelimit(ev_r[l])
    );

    for (genvar p = 0; p < P; p++) begin : g_part
      logic [SID_W-1:0] rs;
      logic [SEQ_W-1:0] rq;

      stream_fifo #(.WIDTH(ADDR_W + TAG_W), .DEPTH(FIFO_DEPTH)) u_req_fifo (
        .clk, .rst_n,
        .in_valid (a_out_valid[p]), .in_ready(a_out_ready[p]),
        .in_data  ({a_out_addr[p], a_out_stream[p], a_out_seq[p]}),
        .out_valid(q_in_valid[l][p]), .out_ready(q_in_ready[l][p]),
        .out_data ({q_in_addr[l][p], q_in_tag[l][p]})
      );

      stream_fifo #(.WIDTH(1 + TAG_W), .DEPTH(FIFO_DEPTH)) u_res_fifo (
        .clk, .rst_n,
        .in_valid (q_out_valid[l][p]), .in_ready(q_out_ready[l][p]),
        .in_data  ({q_out_hit[l][p], q_out_tag[l][p]}),
        .out_valid(u_in_valid[p]), .out_ready(u_in_ready[p]),
        .out_data ({u_in_hit[p], rs, rq})
      );
      assign u_in_stream[p] = rs;
      assign u_in_seq[p]    = rq;
    end

    unshuffle #(.S(S), .P(P), .D(D), .SEQ_W(SEQ_W)) u_unshuffle (
      .clk, .rst_n,
      .in_valid(u_in_valid), .in_ready(u_in_ready), .in_hit(u_in_hit),
      .in_stream(u_in_stream), .in_seq(u_in_seq),
      .out_valid(u_out_valid), .out_ready(u_out_ready), .out_hit(u_out_hit)
    );

    for (genvar s = 0; s < S; s++) begin : g_out
      stream_fifo #(.WIDTH(1), .DEPTH(FIFO_DEPTH)) u_fifo (
        .clk, .rst_n,
        .in_valid (u_out_valid[s]), .in_ready (u_out_ready[s]), .in_data (u_out_hit[s]),
        .out_valid(res_valid[l][s]), .out_ready(res_ready[l][s]), .out_data(res_hit[l][s])
      );
    end
  end

  // the shared partitions: lane 0 on port A, lane 1 on port B
  for (genvar p = 0; p < P; p++) begin : g_bv
    query_bv #(.ADDR_W(ADDR_W), .WORD_W(WORD_W), .TAG_W(TAG_W)) u_bv (
      .clk, .rst_n,
      .clr_start, .busy(p_busy[p]),
      .wr_valid(wr_valid[p]), .wr_ready(wr_ready[p]), .wr_addr(ins_idx[ADDR_W-1:0]),
      .a_in_valid (q_in_valid[0][p]),  .a_in_ready (q_in_ready[0][p]),
      .a_in_addr  (q_in_addr[0][p]),   .a_in_tag   (q_in_tag[0][p]),
      .a_out_valid(q_out_valid[0][p]), .a_out_ready(q_out_ready[0][p]),
      .a_out_hit  (q_out_hit[0][p]),   .a_out_tag  (q_out_tag[0][p]),
      .b_in_valid (q_in_valid[1][p]),  .b_in_ready (q_in_ready[1][p]),
      .b_in_addr  (q_in_addr[1][p]),   .b_in_tag   (q_in_tag[1][p]),
      .b_out_valid(q_out_valid[1][p]), .b_out_ready(q_out_ready[1][p]),
      .b_out_hit  (q_out_hit[1][p]),   .b_out_tag  (q_out_tag[1][p])
    );
  end

  // insert: route the bit to the partition that holds it
  assign ins_part  = (P > 1) ? ins_idx[IDX_W-1 -: LOG2P] : '0;
  assign ins_ready = wr_ready[ins_part];

  for (genvar p = 0; p < P; p++) begin : g_wr
    assign wr_valid[p] = ins_valid && (ins_part == LOG2P'(p));
  end

  always_comb begin
    busy = 1'b0;
    for (int p = 0; p < P; p++) busy = busy || p_busy[p];
  end

  assign ev_conflict  = ev_c[0] || ev_c[1];
  assign ev_full      = ev_f[0] || ev_f[1];
  assign ev_ratelimit = ev_r[0] || ev_r[1];

endmodule
