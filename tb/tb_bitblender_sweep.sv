// tb_bitblender_sweep: the parameter sweeps of the evaluation, at reduced
// section size (one section of 16 kbit: the queries per cycle hardly depend
// on H or on the section size, and every section arbitrates alike). It measures the sustained queries
// per cycle for
//   S = 1..6 at P=8, D=16   (streams)
//   P = 2, 4, 8 at S=6, D=16 (partitions)
//   D = 2, 8, 16 at S=6, P=8   (ratelimit distance)
// with random keys at full input rate, checks every answer, and checks
// the trends that the evaluation reports for streams and partitions:
// throughput grows with S and with P.
module tb_bitblender_sweep;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NPT = 10;
  bit  done [NPT];
  real rate [NPT];
  int  ck [NPT], fl [NPT];
  int checks = 0, failures = 0;

  tb_sweep_point #(.S(1), .P(8), .D(16)) u_s1 (.clk, .done(done[0]),  .rate(rate[0]),  .checks(ck[0]),  .failures(fl[0]));
  tb_sweep_point #(.S(2), .P(8), .D(16)) u_s2 (.clk, .done(done[1]),  .rate(rate[1]),  .checks(ck[1]),  .failures(fl[1]));
  tb_sweep_point #(.S(3), .P(8), .D(16)) u_s3 (.clk, .done(done[2]),  .rate(rate[2]),  .checks(ck[2]),  .failures(fl[2]));
  tb_sweep_point #(.S(4), .P(8), .D(16)) u_s4 (.clk, .done(done[3]),  .rate(rate[3]),  .checks(ck[3]),  .failures(fl[3]));
  tb_sweep_point #(.S(5), .P(8), .D(16)) u_s5 (.clk, .done(done[4]),  .rate(rate[4]),  .checks(ck[4]),  .failures(fl[4]));
  tb_sweep_point #(.S(6), .P(8), .D(16)) u_s6 (.clk, .done(done[5]),  .rate(rate[5]),  .checks(ck[5]),  .failures(fl[5]));
  tb_sweep_point #(.S(6), .P(2), .D(16)) u_p2 (.clk, .done(done[6]),  .rate(rate[6]),  .checks(ck[6]),  .failures(fl[6]));
  tb_sweep_point #(.S(6), .P(4), .D(16)) u_p4 (.clk, .done(done[7]),  .rate(rate[7]),  .checks(ck[7]),  .failures(fl[7]));
  tb_sweep_point #(.S(6), .P(8), .D(2))  u_d2 (.clk, .done(done[8]),  .rate(rate[8]),  .checks(ck[8]),  .failures(fl[8]));
  tb_sweep_point #(.S(6), .P(8), .D(8))  u_d8 (.clk, .done(done[9]),  .rate(rate[9]),  .checks(ck[9]),  .failures(fl[9]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NPT; i++) all &= done[i];
    end while (!all);
    for (int i = 0; i < NPT; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("streams:    S=1 %5.2f  S=2 %5.2f  S=3 %5.2f  S=4 %5.2f  S=5 %5.2f  S=6 %5.2f queries/cycle",
             rate[0], rate[1], rate[2], rate[3], rate[4], rate[5]);
    $display("partitions: P=2 %5.2f  P=4 %5.2f  P=8 %5.2f", rate[6], rate[7], rate[5]);
    $display("distance:   D=2 %5.2f  D=8 %5.2f  D=16 %5.2f", rate[8], rate[9], rate[5]);
    for (int i = 1; i < 6; i++) check(rate[i] > rate[i-1], $sformatf("rate grows from S=%0d to S=%0d", i, i + 1));
    check(rate[0] > 1.9, "single stream runs at close to 2 queries per cycle");
    check(rate[6] < rate[7] && rate[7] < rate[5], "rate grows with P");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
