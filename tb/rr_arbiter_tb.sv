// rr_arbiter_tb: checks the round-robin arbiter against a direct model.
//
// For N = 5 every request pattern is tried with every pointer value
// (including an out-of-range one, which must act as 0).  The expected
// grant is the first request at or after the pointer, wrapping around.
// Also runs the N = 9 arbiter of an IM output-link arbiter on random
// patterns.
module rr_arbiter_tb;
  int checks = 0, failures = 0;

  logic [4:0] req5, gnt5;
  logic [2:0] ptr5, idx5;
  logic       any5;
  rr_arbiter #(.N(5)) dut5 (.req(req5), .ptr(ptr5), .gnt(gnt5), .gnt_idx(idx5), .any_gnt(any5));

  logic [8:0] req9, gnt9;
  logic [3:0] ptr9, idx9;
  logic       any9;
  rr_arbiter #(.N(9)) dut9 (.req(req9), .ptr(ptr9), .gnt(gnt9), .gnt_idx(idx9), .any_gnt(any9));

  function automatic int expect_idx(input int n, input logic [15:0] req, input int ptr);
    int start = (ptr < n) ? ptr : 0;
    for (int s = 0; s < n; s++) if (req[(start + s) % n]) return (start + s) % n;
    return -1;
  endfunction

  task automatic check5();
    int e = expect_idx(5, 16'(req5), int'(ptr5));
    checks++;
    if (e < 0) begin
      if (any5 || gnt5 != '0) begin failures++; $display("FAIL n5 req=%b ptr=%0d expected none", req5, ptr5); end
    end else if (!any5 || int'(idx5) != e || gnt5 != 5'(1 << e)) begin
      failures++; $display("FAIL n5 req=%b ptr=%0d got %0d/%b expected %0d", req5, ptr5, idx5, gnt5, e);
    end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < 6; p++) begin
      for (int r = 0; r < 32; r++) begin
        req5 = 5'(r); ptr5 = 3'(p); #1; check5();
      end
    end
    for (int t = 0; t < 2000; t++) begin
      int e;
      req9 = 9'($urandom); ptr9 = 4'($urandom_range(0, 8)); #1;
      e = expect_idx(9, 16'(req9), int'(ptr9));
      checks++;
      if ((e < 0 && any9) || (e >= 0 && (!any9 || int'(idx9) != e || gnt9 != 9'(1 << e)))) begin
        failures++; $display("FAIL n9 req=%b ptr=%0d got %0d expected %0d", req9, ptr9, idx9, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
