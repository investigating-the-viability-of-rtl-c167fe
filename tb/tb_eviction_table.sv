// tb_eviction_table: self-checking testbench for the eviction table, the
// attack detector that counts evictions per cache set.
// Evictions are presented one at a time (each after the previous search has
// finished) and the suspicious-entry count and the attack flag are compared
// with a reference table after every one: a hit increments the entry's
// counter, saturating at W_THR, and an entry that reaches W_THR becomes
// suspicious; a miss fills a free entry or replaces the least recently updated
// one. Phases: random sets (mostly below threshold), a prime-and-probe-like
// burst on K_THR sets (attack must rise), churn that pushes those entries out
// (attack must fall), and back-to-back evictions that overflow the one-deep
// input buffer (dropped must count). Parameter values N_ENT=8, W_THR=8 and
// K_THR=4 are this design's choice; the published design gives the mechanism only.
module tb_eviction_table;
  localparam int SET_W = 11, N_ENT = 8, W_THR = 8, K_THR = 4, EW = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_attack = 0;

  logic rst_n, clear, ev_evict, attack, busy;
  logic [SET_W-1:0] evict_set;
  logic [EW:0] suspicious;
  logic [15:0] dropped;

  eviction_table #(.SET_W(SET_W), .N_ENT(N_ENT), .W_THR(W_THR), .K_THR(K_THR)) dut (.*);

  bit val [N_ENT];
  int eset [N_ENT], ecnt [N_ENT], etime [N_ENT];
  int tnow, susp;

  task automatic cmp(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d t=%0t", what, got, exp, $time);
    end
  endtask

  task automatic evict(input int s);
    int hit, old;
    @(negedge clk);
    ev_evict = 1; evict_set = SET_W'(s);
    @(negedge clk); ev_evict = 0;
    while (busy) @(negedge clk);
    // reference update
    tnow++;
    hit = -1;
    for (int i = 0; i < N_ENT; i++) if (val[i] && eset[i] == s) hit = i;
    if (hit >= 0) begin
      etime[hit] = tnow;
      if (ecnt[hit] < W_THR) begin
        ecnt[hit]++;
        if (ecnt[hit] == W_THR) susp++;
      end
    end else begin
      old = -1;
      for (int i = 0; i < N_ENT; i++) if (!val[i] && old < 0) old = i;
      if (old < 0) begin
        old = 0;
        for (int i = 1; i < N_ENT; i++) if (etime[i] < etime[old]) old = i;
        if (ecnt[old] >= W_THR) susp--;
      end
      val[old] = 1; eset[old] = s; ecnt[old] = 1; etime[old] = tnow;
    end
    cmp("suspicious entries", int'(suspicious), susp);
    cmp("attack flag", int'(attack), int'(susp >= K_THR));
    if (attack) n_attack++;
  endtask

  initial begin
    #5000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; ev_evict = 0; evict_set = 0; tnow = 0; susp = 0;
    foreach (val[i]) val[i] = 0;
    #12 rst_n = 1;
    // random background evictions over 24 sets
    for (int n = 0; n < 400; n++) evict($urandom % 24);
    // targeted: K_THR sets evicted W_THR times each, interleaved
    for (int r = 0; r < W_THR; r++)
      for (int s = 0; s < K_THR; s++) evict(1000 + s);
    cmp("attack after burst", int'(attack), 1);
    // churn: many fresh sets push the suspicious entries out
    for (int n = 0; n < 3 * N_ENT; n++) evict(1500 + n);
    cmp("attack cleared by churn", int'(attack), 0);
    // clear
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    foreach (val[i]) val[i] = 0;
    susp = 0;
    cmp("cleared", int'(suspicious), 0);
    // three evictions in three cycles: one searched, one buffered, one dropped
    @(negedge clk); ev_evict = 1; evict_set = 11'd1;
    @(negedge clk); evict_set = 11'd2;
    @(negedge clk); evict_set = 11'd3;
    @(negedge clk); ev_evict = 0;
    while (busy) @(negedge clk);
    cmp("dropped eviction", int'(dropped), 1);
    cmp("attack seen", int'(n_attack > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
