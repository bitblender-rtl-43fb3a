// aggregate: final step of one Bloom filter query. It waits until the
// lookup result of the query has arrived from every one of the H bit-vector
// sections, takes all H together and outputs their AND: 1 means the key is
// probably in the set, 0 that it is certainly not.
//
// Interface: H inputs with valid/ready/hit, one output with valid/ready/hit.
// The inputs are consumed together, only when all H are valid and the
// output register is free or being read. The result is registered: one
// cycle of latency, one query per cycle.
//
// Follows the published BitBlender design: the AND of the H lookups per query. This design's
// choice: the join of the H inputs and the output register.
module aggregate #(
  parameter int unsigned H = 9
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid [H],
  output logic in_ready [H],
  input  logic in_hit   [H],
  output logic out_valid,
  input  logic out_ready,
  output logic out_hit
);
  logic all_valid, all_hit, advance;

  always_comb begin
    all_valid = 1'b1;
    all_hit   = 1'b1;
    for (int h = 0; h < H; h++) begin
      all_valid = all_valid && in_valid[h];
      all_hit   = all_hit && in_hit[h];
    end
    advance = !out_valid || out_ready;
    for (int h = 0; h < H; h++) in_ready[h] = advance && all_valid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hit   <= 1'b0;
    end else if (advance) begin
      out_valid <= all_valid;
      if (all_valid) out_hit <= all_hit;
    end
  end

endmodule
