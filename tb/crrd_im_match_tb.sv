// crrd_im_match_tb: phase-1 CRRD matching in one IM against a model.
//
// Directed part (n = m = k = 3, nine VOQs, three links): from reset all
// pointers are 0 and VOQs 0, 3, 4 and 6 request.  Every link arbiter
// grants VOQ 0, which accepts link 0; link 1 and 2 stay unmatched after
// one round.  A second round gives link 1 to VOQ 3, a third gives link 2
// to VOQ 4.  Random part: random request vectors, CM grants and commits,
// compared every cycle with a behavioural model that keeps its own
// pointers and applies the first-round-and-CM-granted update rule.
module crrd_im_match_tb;
  localparam int NK = 9, M = 3, ITER = 3;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [NK-1:0] req;
  logic commit;
  logic [M-1:0] cm_gnt, link_valid, link_first;
  logic [3:0] link_voq [M];
  logic [NK-1:0] voq_matched;

  crrd_im_match #(.NK(NK), .M(M), .ITER(ITER)) dut (
    .clk, .rst_n, .req, .commit, .cm_gnt, .link_valid, .link_voq, .link_first, .voq_matched);

  always #5 clk = ~clk;

  // model state
  int mpl [M];
  int mpv [NK];
  int e_voq [M];
  int e_first [M];

  task automatic model_match(input logic [NK-1:0] rq);
    bit vfree [NK];
    bit lfree [M];
    int g [M];
    for (int v = 0; v < NK; v++) vfree[v] = rq[v];
    for (int r = 0; r < M; r++) begin lfree[r] = 1; e_voq[r] = -1; e_first[r] = 0; end
    for (int it = 0; it < ITER; it++) begin
      for (int r = 0; r < M; r++) begin
        g[r] = -1;
        if (lfree[r])
          for (int s = 0; s < NK; s++)
            if (g[r] < 0 && vfree[(mpl[r] + s) % NK]) g[r] = (mpl[r] + s) % NK;
      end
      for (int v = 0; v < NK; v++) begin
        int a = -1;
        for (int s = 0; s < M; s++) begin
          int r = (mpv[v] + s) % M;
          if (a < 0 && g[r] == v) a = r;
        end
        if (a >= 0) begin
          vfree[v] = 0; lfree[a] = 0; e_voq[a] = v; e_first[a] = (it == 0);
        end
      end
    end
  endtask

  task automatic compare(input string tag);
    for (int r = 0; r < M; r++) begin
      checks++;
      if (link_valid[r] != (e_voq[r] >= 0) ||
          (e_voq[r] >= 0 && (int'(link_voq[r]) != e_voq[r] || link_first[r] != e_first[r][0]))) begin
        failures++;
        $display("FAIL %s link %0d: got v=%0b voq=%0d first=%0b expected voq=%0d first=%0d",
                 tag, r, link_valid[r], link_voq[r], link_first[r], e_voq[r], e_first[r]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < M; r++) mpl[r] = 0;
    for (int v = 0; v < NK; v++) mpv[v] = 0;
    req = '0; commit = 0; cm_gnt = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Directed example from reset.
    req = 9'b001011001;  // VOQ 0, 3, 4, 6
    #1;
    checks++;
    if (!(link_valid == 3'b111 && link_voq[0] == 0 && link_voq[1] == 3 && link_voq[2] == 4 &&
          link_first == 3'b001)) begin
      failures++; $display("FAIL directed example: valid=%b voq=%0d,%0d,%0d first=%b",
                           link_valid, link_voq[0], link_voq[1], link_voq[2], link_first);
    end
    // Random with model.
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req    = NK'($urandom) & NK'($urandom | $urandom);
      cm_gnt = M'($urandom);
      commit = ($urandom_range(0, 3) != 0);
      #1;
      model_match(req);
      compare("random");
      checks++;
      begin
        logic [NK-1:0] em;
        em = '0;
        for (int r = 0; r < M; r++) if (e_voq[r] >= 0) em[e_voq[r]] = 1'b1;
        if (voq_matched != em) begin failures++; $display("FAIL voq_matched %b vs %b", voq_matched, em); end
      end
      @(posedge clk);
      if (commit)
        for (int r = 0; r < M; r++)
          if (e_voq[r] >= 0 && e_first[r] != 0 && cm_gnt[r]) begin
            mpl[r] = (e_voq[r] + 1) % NK;
            mpv[e_voq[r]] = (r + 1) % M;
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
