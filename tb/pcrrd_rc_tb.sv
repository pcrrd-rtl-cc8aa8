// pcrrd_rc_tb: request counters against a model.
//
// Random arrivals (0..n per VOQ and slot) and random hand-overs (only
// where a request is pending) for 16 VOQs; the counts and the pending
// flags are compared with a model every slot.
module pcrrd_rc_tb;
  localparam int NK = 16, N = 4, LMAX = 31;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [2:0]    arr_cnt [NK];
  logic [NK-1:0] take, pending;
  logic [4:0]    count [NK];
  int model [NK];

  pcrrd_rc #(.NK(NK), .N(N), .LMAX(LMAX)) dut (.clk, .rst_n, .arr_cnt, .take, .count, .pending);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    take = '0;
    for (int v = 0; v < NK; v++) begin arr_cnt[v] = '0; model[v] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int v = 0; v < NK; v++) begin
        checks++;
        if (int'(count[v]) != model[v]) begin
          failures++; $display("FAIL t=%0d C(%0d)=%0d expected %0d", t, v, count[v], model[v]);
        end
        // keep the model below LMAX: arrivals only while room remains
        arr_cnt[v] = (model[v] + N <= LMAX) ? 3'($urandom_range(0, N)) : 3'd0;
        if ($urandom_range(0, 3) == 0) arr_cnt[v] = 3'd0;
      end
      #1;
      for (int v = 0; v < NK; v++) begin
        bit pend;
        pend = (model[v] + int'(arr_cnt[v])) > 0;
        checks++;
        if (pending[v] != pend) begin failures++; $display("FAIL pending %0d", v); end
        take[v] = pend && ($urandom_range(0, 2) != 0);
      end
      @(posedge clk);
      for (int v = 0; v < NK; v++) model[v] = model[v] + int'(arr_cnt[v]) - int'(take[v]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
