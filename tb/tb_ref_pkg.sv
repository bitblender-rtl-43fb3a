// tb_ref_pkg: reference model used by the testbenches.
//
// murmur3_32 follows the published MurmurHash3_x86_32 algorithm for a
// single 4-byte little-endian block, written out step by step and
// independently of the RTL hash unit, so that the testbenches can predict
// the bit-vector indices of a key.
package tb_ref_pkg;

  function automatic bit [31:0] rol(bit [31:0] x, int r);
    bit [63:0] w;
    w = {x, x} << r;
    return w[63:32];
  endfunction

  function automatic bit [31:0] murmur3_32(bit [31:0] key, bit [31:0] seed);
    bit [31:0] h, k;
    h = seed;
    k = key;
    k = k * 32'd3432918353;          // 0xcc9e2d51
    k = rol(k, 15);
    k = k * 32'd461845907;           // 0x1b873593
    h = h ^ k;
    h = rol(h, 13);
    h = h * 32'd5 + 32'd3864292196;  // 0xe6546b64
    h = h ^ 32'd4;                   // length in bytes
    h = h ^ (h >> 16);
    h = h * 32'd2246822507;          // 0x85ebca6b
    h = h ^ (h >> 13);
    h = h * 32'd3266489909;          // 0xc2b2ae35
    h = h ^ (h >> 16);
    return h;
  endfunction

endpackage
