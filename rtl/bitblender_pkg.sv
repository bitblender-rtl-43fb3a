// bitblender_pkg: constants shared by the Bloom filter accelerator.
//
// The hash used to turn a 32-bit query into bit-vector indices is the
// 32-bit MurmurHash3 (x86_32 variant) applied to a single 4-byte block.
// Its multiplier and offset constants live here so that every hash unit
// uses the same values. The index of hash function j is obtained with
// seed j; the seed choice is this design's own (the algorithm only needs
// H different seeds).
package bitblender_pkg;

  // MurmurHash3 x86_32 block mixing constants
  localparam logic [31:0] MM_C1 = 32'hcc9e2d51;
  localparam logic [31:0] MM_C2 = 32'h1b873593;
  // body step: h = rotl(h,13) * 5 + MM_N
  localparam logic [31:0] MM_N  = 32'he6546b64;
  // finalisation multipliers
  localparam logic [31:0] MM_F1 = 32'h85ebca6b;
  localparam logic [31:0] MM_F2 = 32'hc2b2ae35;
  // key length in bytes, mixed in during finalisation
  localparam logic [31:0] MM_LEN = 32'd4;

  function automatic logic [31:0] rotl32(input logic [31:0] x, input int unsigned r);
    return (x << r) | (x >> (32 - r));
  endfunction

endpackage
