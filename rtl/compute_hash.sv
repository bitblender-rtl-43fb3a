// compute_hash: turns one 32-bit query key into H bit-vector indices, one
// per bit-vector section, with the 32-bit MurmurHash3 (x86_32, one 4-byte
// block). Hash function j uses seed j, and its index is the low IDX_W bits
// of the 32-bit hash, i.e. the hash modulo the section length 2**IDX_W.
//
// How it works: a five-stage pipeline. Stages 1 and 2 mix the key block
// (multiply, rotate, multiply); they do not depend on the seed and are
// shared by all H functions. Stage 3 folds the block into each seed and
// applies the body step, the length and the first xor-shift; stages 4 and
// 5 apply the two finalisation multiplies and xor-shifts, H copies in
// parallel. One key is accepted per cycle.
//
// Interface: in_valid/in_ready/in_key in, out_valid/out_ready/out_idx out.
// Latency is five cycles when out_ready stays high. A stage holds its
// contents when the stage after it is full and cannot move, so backpressure
// from out_ready stops the pipeline without losing data.
//
// Follows the published BitBlender design: MurmurHash3 as the hash, H hashes per query, one
// index per section. This design's choices: the seeds, the power-of-two
// section length and the pipeline cut.
module compute_hash
  import bitblender_pkg::*;
#(
  parameter int unsigned H     = 9,
  parameter int unsigned IDX_W = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [31:0]         in_key,
  output logic                out_valid,
  input  logic                out_ready,
  output logic [IDX_W-1:0]    out_idx [H]
);
  localparam int unsigned NST = 5;

  logic [NST:1] v;        // stage valid bits
  logic [NST+1:1] rdy;    // stage i may load this cycle

  logic [31:0] k1, k2;
  logic [31:0] h3 [H];
  logic [31:0] h4 [H];
  logic [31:0] h5 [H];

  always_comb begin
    rdy[NST+1] = out_ready;
    for (int i = NST; i >= 1; i--) rdy[i] = !v[i] || rdy[i+1];
  end

  assign in_ready  = rdy[1];
  assign out_valid = v[NST];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v <= '0;
    end else begin
      if (rdy[1]) v[1] <= in_valid;
      for (int i = 2; i <= NST; i++)
        if (rdy[i]) v[i] <= v[i-1];
    end
  end

  // datapath registers need no reset: their valid bits guard them
  always_ff @(posedge clk) begin
    if (rdy[1]) k1 <= in_key * MM_C1;
    if (rdy[2]) k2 <= rotl32(k1, 15) * MM_C2;
    for (int j = 0; j < H; j++) begin
      logic [31:0] h;
      h = rotl32(32'(j) ^ k2, 13);
      h = (h * 32'd5) + MM_N;
      h = h ^ MM_LEN;
      h = h ^ (h >> 16);
      if (rdy[3]) h3[j] <= h;
      if (rdy[4]) h4[j] <= (h3[j] * MM_F1) ^ ((h3[j] * MM_F1) >> 13);
      if (rdy[5]) h5[j] <= (h4[j] * MM_F2) ^ ((h4[j] * MM_F2) >> 16);
    end
  end

  always_comb
    for (int j = 0; j < H; j++) out_idx[j] = h5[j][IDX_W-1:0];

endmodule
