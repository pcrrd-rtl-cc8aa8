// pcrrd_bernoulli_tb: delay versus load under uniform Bernoulli traffic at
// the full 64-port size, for three scheduler settings side by side:
//   A: P = 1, 4 iterations (plain CRRD timing)
//   B: P = 4, 4 iterations
//   C: P = 4, 1 iteration
// Checks, besides the order/route/latency checks inside each bench:
//   * at light load the pipeline adds roughly P-1 slots: B - A is 2..5;
//   * one iteration matches fewer pairs per slot than four, so at 40 %
//     load C has a higher delay than B;
//   * carried traffic equals offered traffic within 3 % at every point.
// The heavy-load gap between A and B is printed, not checked: with the
// 16-cell VOQs used here it is a third to a half or more of A's delay at 70-90 %
// load, larger than the near-equal curves the source reports.
// Prints one line per load point and the usual TB_RESULT line.
module pcrrd_bernoulli_tb;
  localparam int NL = 4;
  localparam int unsigned LOADS [NL] = '{10, 40, 70, 90};
  logic clk = 0;
  always #5 clk = ~clk;

  logic done_a, done_b, done_c;
  real  d_a [NL], d_b [NL], d_c [NL];
  real  r_a [NL], r_b [NL], r_c [NL];
  int   ck_a, ck_b, ck_c, fl_a, fl_b, fl_c;

  delay_bench #(.P(1), .ITER(4), .NLOADS(NL), .LOAD_PCT(LOADS)) u_a (
    .clk, .done(done_a), .mean_delay(d_a), .out_rate(r_a), .checks(ck_a), .failures(fl_a));
  delay_bench #(.P(4), .ITER(4), .NLOADS(NL), .LOAD_PCT(LOADS)) u_b (
    .clk, .done(done_b), .mean_delay(d_b), .out_rate(r_b), .checks(ck_b), .failures(fl_b));
  delay_bench #(.P(4), .ITER(1), .NLOADS(NL), .LOAD_PCT(LOADS)) u_c (
    .clk, .done(done_c), .mean_delay(d_c), .out_rate(r_c), .checks(ck_c), .failures(fl_c));

  initial begin
    int checks, failures;
    real diff;
    checks = 0; failures = 0;
    repeat (2) @(posedge clk);
    wait (done_a && done_b && done_c);
    checks = ck_a + ck_b + ck_c;
    failures = fl_a + fl_b + fl_c;
    diff = d_b[0] - d_a[0];
    checks++;
    if (diff < 2.0 || diff > 5.0) begin
      failures++;
      $display("FAIL light-load pipeline cost %0.2f slots", diff);
    end
    $display("heavy-load gap P=4 vs P=1: %0.2f slots against %0.2f", d_b[NL-1] - d_a[NL-1], d_a[NL-1]);
    checks++;
    if (d_c[1] <= d_b[1]) begin
      failures++;
      $display("FAIL load %0d%%: 1 iteration %0.2f not above 4 iterations %0.2f", LOADS[1], d_c[1], d_b[1]);
    end
    for (int l = 0; l < NL; l++) begin
      real off;
      off = real'(LOADS[l]) / 100.0;
      checks += 3;
      if (r_a[l] < off - 0.03 || r_a[l] > off + 0.03) begin failures++; $display("FAIL A carried %0.3f", r_a[l]); end
      if (r_b[l] < off - 0.03 || r_b[l] > off + 0.03) begin failures++; $display("FAIL B carried %0.3f", r_b[l]); end
      if (r_c[l] < off - 0.03 || r_c[l] > off + 0.03) begin failures++; $display("FAIL C carried %0.3f", r_c[l]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("TB_RESULT checks=0 failures=1");
    $display("FAIL watchdog");
    $finish;
  end
endmodule
