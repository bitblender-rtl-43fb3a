// query_bv: one partition of one bit-vector section, held in on-chip RAM,
// answering two lookups per cycle.
//
// The partition stores 2**ADDR_W bits as 2**ADDR_W / WORD_W words of
// WORD_W bits (the low bits of an address pick the bit inside a word).
// Port A and port B each take one lookup per cycle: the word is read, the
// addressed bit is returned together with the lookup's tag (stream ID and
// sequence number, passed through untouched). This matches a true
// dual-port block RAM: port A serves the first query of every stream's
// query pair, port B the second.
//
// Port A also does the writes that build the Bloom filter:
//  * clear: a pulse on clr_start sweeps every word to zero, one word per
//    cycle (2**ADDR_W / WORD_W cycles); busy is high meanwhile and both
//    ports accept no lookups. The bit-vector starts as all zeros.
//  * insert: wr_valid sets the bit at wr_addr; a lookup on port A waits for
//    that cycle. wr_ready is low only while clearing.
// A lookup issued in the same cycle as, or before, an insert to the same
// bit may see the old value; the user finishes inserting before querying.
//
// Timing: one cycle from an accepted lookup to out_valid. Each port has one
// output register and accepts a new lookup whenever that register is empty
// or being read, so back-to-back lookups run at one per cycle per port.
//
// Follows the published BitBlender design: the bit-vector partition in BRAM/URAM, two lookups per
// cycle through the two RAM ports. This design's choices: the word width,
// the clear sweep and the insert port.
module query_bv #(
  parameter int unsigned ADDR_W = 21,
  parameter int unsigned WORD_W = 64,
  parameter int unsigned TAG_W  = 13,
  localparam int unsigned BIT_W  = $clog2(WORD_W),
  localparam int unsigned WA_W   = ADDR_W - BIT_W,
  localparam int unsigned NWORDS = 1 << WA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // bit-vector maintenance
  input  logic              clr_start,
  output logic              busy,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [ADDR_W-1:0] wr_addr,
  // lookup port A
  input  logic              a_in_valid,
  output logic              a_in_ready,
  input  logic [ADDR_W-1:0] a_in_addr,
  input  logic [TAG_W-1:0]  a_in_tag,
  output logic              a_out_valid,
  input  logic              a_out_ready,
  output logic              a_out_hit,
  output logic [TAG_W-1:0]  a_out_tag,
  // lookup port B
  input  logic              b_in_valid,
  output logic              b_in_ready,
  input  logic [ADDR_W-1:0] b_in_addr,
  input  logic [TAG_W-1:0]  b_in_tag,
  output logic              b_out_valid,
  input  logic              b_out_ready,
  output logic              b_out_hit,
  output logic [TAG_W-1:0]  b_out_tag
);
  logic [WORD_W-1:0] mem [NWORDS];

  logic            clearing;
  logic [WA_W-1:0] clr_ptr;
  logic            a_fire, b_fire, do_wr;

  assign busy       = clearing;
  assign wr_ready   = !clearing;
  assign do_wr      = wr_valid && wr_ready;
  assign a_in_ready = (!a_out_valid || a_out_ready) && !clearing && !wr_valid;
  assign b_in_ready = (!b_out_valid || b_out_ready) && !clearing;
  assign a_fire     = a_in_valid && a_in_ready;
  assign b_fire     = b_in_valid && b_in_ready;

  // port A: clear sweep or single-bit set
  always_ff @(posedge clk) begin
    if (clearing)
      mem[clr_ptr] <= '0;
    else if (do_wr)
      mem[wr_addr[ADDR_W-1:BIT_W]][wr_addr[BIT_W-1:0]] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clearing <= 1'b0;
      clr_ptr  <= '0;
    end else if (clearing) begin
      clr_ptr <= clr_ptr + 1'b1;
      if (clr_ptr == WA_W'(NWORDS - 1)) clearing <= 1'b0;
    end else if (clr_start) begin
      clearing <= 1'b1;
      clr_ptr  <= '0;
    end
  end

  // read ports: registered word lookup
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_out_valid <= 1'b0;
      b_out_valid <= 1'b0;
    end else begin
      if (!a_out_valid || a_out_ready) a_out_valid <= a_fire;
      if (!b_out_valid || b_out_ready) b_out_valid <= b_fire;
    end
  end

  always_ff @(posedge clk) begin
    if (a_fire) begin
      a_out_hit <= mem[a_in_addr[ADDR_W-1:BIT_W]][a_in_addr[BIT_W-1:0]];
      a_out_tag <= a_in_tag;
    end
    if (b_fire) begin
      b_out_hit <= mem[b_in_addr[ADDR_W-1:BIT_W]][b_in_addr[BIT_W-1:0]];
      b_out_tag <= b_in_tag;
    end
  end

endmodule
