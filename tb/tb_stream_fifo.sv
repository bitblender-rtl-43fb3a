// tb_stream_fifo: random pushes and pops against a queue model; checks the
// data order, that in_ready falls exactly at DEPTH words and out_valid
// exactly at zero, and the one-cycle write-to-read latency.
module tb_stream_fifo;
  localparam int WIDTH = 16;
  localparam int DEPTH = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [WIDTH-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];

  stream_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid && in_ready, "empty after reset");
    // latency: a word written in one cycle is readable in the next
    in_valid = 1; in_data = 16'h1234;
    @(negedge clk);
    in_valid = 0;
    check(out_valid && out_data == 16'h1234, "one-cycle latency");
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
    check(!out_valid, "empty after single read");
    for (int cyc = 0; cyc < 20000; cyc++) begin
      in_valid  = ($urandom_range(0, 99) < (cyc % 2000 < 1000 ? 70 : 30));
      in_data   = WIDTH'($urandom);
      out_ready = ($urandom_range(0, 99) < (cyc % 2000 < 1000 ? 30 : 70));
      #1;
      check(in_ready == (model.size() < DEPTH), "in_ready vs fill");
      check(out_valid == (model.size() > 0), "out_valid vs fill");
      if (out_valid && model.size() > 0) check(out_data == model[0], "data order");
      @(posedge clk);
      if (out_valid && out_ready && model.size() > 0) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
