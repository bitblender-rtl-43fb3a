// tb_compute_hash: feeds random keys (and a few fixed ones) into the hash
// pipeline at its default size, with random gaps and random output stalls,
// and compares every index with the reference MurmurHash3 (seed j for
// hash j, low IDX_W bits). Also checks the five-cycle latency and that a
// stream of keys with no stalls comes out at one per cycle.
module tb_compute_hash;
  import tb_ref_pkg::*;
  localparam int H = 9;
  localparam int IDX_W = 24;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_key;
  logic [IDX_W-1:0] out_idx [H];
  int checks = 0, failures = 0;
  bit [31:0] sent [$];
  int n_out = 0;

  compute_hash dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      bit [31:0] k;
      k = sent.pop_front();
      for (int j = 0; j < H; j++)
        check(out_idx[j] == IDX_W'(murmur3_32(k, j)), $sformatf("index %0d of key %h", j, k));
      n_out++;
    end
  end

  initial begin
    int t0, t1;
    in_valid = 0; out_ready = 1; in_key = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // known value: MurmurHash3_x86_32 of 4 zero bytes with seed 0 is 0x2362f9de
    check(murmur3_32(32'h0, 0) == 32'h2362f9de, "reference model self-test");
    // latency of one key
    @(negedge clk);
    in_valid = 1; in_key = 32'h0;
    sent.push_back(in_key);
    t0 = n_out;
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    check(n_out == t0 && !out_valid, "no output before 5 cycles");
    @(negedge clk);
    check(out_valid, "output after 5 cycles");
    @(negedge clk);
    // full rate: 100 keys in 100 cycles
    t0 = n_out;
    for (int i = 0; i < 100; i++) begin
      in_valid = 1; in_key = $urandom;
      sent.push_back(in_key);
      @(negedge clk);
      check(in_ready || i == 0, "no stall at full rate");
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    check(n_out - t0 == 100, "100 keys out 5 cycles after the last");
    // random traffic with backpressure
    for (int i = 0; i < 5000; i++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      in_key    = $urandom;
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (in_valid && in_ready) sent.push_back(in_key);
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (10) @(negedge clk);
    check(sent.size() == 0, "every key came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
