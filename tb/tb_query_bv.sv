// tb_query_bv: one bit-vector partition at ADDR_W=10 (1024 bits, 16 words
// of 64). Checks that a clear takes one cycle per word and zeroes
// everything, that inserted bits read back as 1 and all others as 0 on
// both ports, that lookups keep their tags and order under random output
// stalls, that each port returns its result one cycle after acceptance and
// sustains one lookup per cycle, and that an insert holds port A for one
// cycle only.
module tb_query_bv;
  localparam int ADDR_W = 10, WORD_W = 64, TAG_W = 8;
  localparam int NWORDS = (1 << ADDR_W) / WORD_W;

  logic clk = 0, rst_n = 0;
  logic clr_start, busy, wr_valid, wr_ready;
  logic [ADDR_W-1:0] wr_addr;
  logic a_in_valid, a_in_ready, a_out_valid, a_out_ready, a_out_hit;
  logic [ADDR_W-1:0] a_in_addr;
  logic [TAG_W-1:0] a_in_tag, a_out_tag;
  logic b_in_valid, b_in_ready, b_out_valid, b_out_ready, b_out_hit;
  logic [ADDR_W-1:0] b_in_addr;
  logic [TAG_W-1:0] b_in_tag, b_out_tag;

  int checks = 0, failures = 0;
  bit model [1 << ADDR_W];
  typedef struct { bit hit; logic [TAG_W-1:0] tag; } exp_t;
  exp_t exp_a [$], exp_b [$];

  query_bv #(.ADDR_W(ADDR_W), .WORD_W(WORD_W), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    exp_t e;
    if (a_out_valid && a_out_ready) begin
      check(exp_a.size() > 0, "port A result expected");
      if (exp_a.size() > 0) begin
        e = exp_a.pop_front();
        check(a_out_hit == e.hit && a_out_tag == e.tag, "port A hit/tag");
      end
    end
    if (b_out_valid && b_out_ready) begin
      check(exp_b.size() > 0, "port B result expected");
      if (exp_b.size() > 0) begin
        e = exp_b.pop_front();
        check(b_out_hit == e.hit && b_out_tag == e.tag, "port B hit/tag");
      end
    end
    if (a_in_valid && a_in_ready) exp_a.push_back('{model[a_in_addr], a_in_tag});
    if (b_in_valid && b_in_ready) exp_b.push_back('{model[b_in_addr], b_in_tag});
    if (wr_valid && wr_ready) model[wr_addr] = 1;
  end

  initial begin
    int n;
    clr_start = 0; wr_valid = 0; wr_addr = 0;
    a_in_valid = 0; a_in_addr = 0; a_in_tag = 0; a_out_ready = 1;
    b_in_valid = 0; b_in_addr = 0; b_in_tag = 0; b_out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // clear: busy for NWORDS cycles
    clr_start = 1;
    @(negedge clk);
    clr_start = 0;
    n = 0;
    while (busy) begin n++; check(!a_in_ready && !b_in_ready && !wr_ready, "idle ports while clearing"); @(negedge clk); end
    check(n == NWORDS, $sformatf("clear took %0d cycles, expected %0d", n, NWORDS));
    // insert 200 random bits
    for (int i = 0; i < 200; i++) begin
      wr_valid = 1; wr_addr = ADDR_W'($urandom);
      @(negedge clk);
    end
    wr_valid = 0;
    // latency and rate: 64 back-to-back lookups on both ports
    for (int i = 0; i < 64; i++) begin
      a_in_valid = 1; a_in_addr = ADDR_W'($urandom); a_in_tag = TAG_W'(i);
      b_in_valid = 1; b_in_addr = ADDR_W'($urandom); b_in_tag = TAG_W'(i + 100);
      #1;
      check(a_in_ready && b_in_ready, "one lookup per cycle per port");
      @(negedge clk);
      check(a_out_valid && b_out_valid && a_out_tag == TAG_W'(i) && b_out_tag == TAG_W'(i + 100),
            "result one cycle after lookup");
    end
    a_in_valid = 0; b_in_valid = 0;
    @(negedge clk);
    // every address on both ports
    for (int i = 0; i < (1 << ADDR_W); i++) begin
      a_in_valid = 1; a_in_addr = ADDR_W'(i); a_in_tag = TAG_W'(i);
      b_in_valid = 1; b_in_addr = ADDR_W'((1 << ADDR_W) - 1 - i); b_in_tag = TAG_W'(i);
      @(negedge clk);
    end
    // random mix with inserts and stalls
    for (int i = 0; i < 5000; i++) begin
      wr_valid    = ($urandom_range(0, 9) == 0);
      wr_addr     = ADDR_W'($urandom);
      a_in_valid  = ($urandom_range(0, 3) != 0);
      a_in_addr   = ADDR_W'($urandom); a_in_tag = TAG_W'($urandom);
      b_in_valid  = ($urandom_range(0, 3) != 0);
      b_in_addr   = ADDR_W'($urandom); b_in_tag = TAG_W'($urandom);
      a_out_ready = ($urandom_range(0, 2) != 0);
      b_out_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (wr_valid) check(!a_in_ready, "insert holds port A");
      @(negedge clk);
    end
    wr_valid = 0; a_in_valid = 0; b_in_valid = 0; a_out_ready = 1; b_out_ready = 1;
    repeat (5) @(negedge clk);
    check(exp_a.size() == 0 && exp_b.size() == 0, "all lookups answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
