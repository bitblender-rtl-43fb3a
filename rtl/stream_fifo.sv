// stream_fifo: synchronous first-in first-out buffer with valid/ready on
// both sides. Every pair of neighbouring modules in the accelerator is
// joined by one of these, so that each module can run at one item per
// cycle and stalls propagate as backpressure.
//
// Interface: a word is written when in_valid && in_ready and read when
// out_valid && out_ready; both may happen in the same cycle. in_ready is
// low only when DEPTH words are stored. out_data shows the oldest word
// whenever out_valid is high (first-word fall-through), so the latency
// from write to read is one cycle. The depth is a design choice; the
// storage is not reset, only the pointers and the count.
module stream_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             push, pop;

  assign in_ready  = (count < (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  // the count never leaves 0..DEPTH
  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH))
    else $error("stream_fifo: count above depth");

endmodule
