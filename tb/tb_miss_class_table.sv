// tb_miss_class_table: self-checking testbench for the miss classification
// table, which remembers (part of) the tag last evicted from every set and
// calls a miss a conflict miss when it asks for that tag again, else a
// capacity miss.
// Random evictions and misses over 64 sets, with tags chosen so that about
// half the misses re-request the last evicted tag, are compared against a
// reference table; both counters and the combinational is_conflict flag are
// checked, and a clear empties the table. The published design describes the table
// and the two miss classes; keeping only 8 tag bits is this design's choice
// (a partial-tag alias counts as a conflict in both DUT and reference).
module tb_miss_class_table;
  localparam int SET_W = 11, TAG_W = 22, PTAG_W = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, clear, ev_evict, ev_miss, is_conflict;
  logic [SET_W-1:0] evict_set, miss_set;
  logic [TAG_W-1:0] evict_tag, miss_tag;
  logic [31:0] conflict_misses, capacity_misses;

  miss_class_table #(.SET_W(SET_W), .TAG_W(TAG_W), .PTAG_W(PTAG_W)) dut (.*);

  logic [TAG_W-1:0] last [64];
  bit               has  [64];
  int n_conf, n_cap, n_conf_total;

  task automatic cmp(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #2000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; ev_evict = 0; ev_miss = 0; evict_set = 0; miss_set = 0;
    evict_tag = 0; miss_tag = 0; n_conf = 0; n_cap = 0; n_conf_total = 0;
    foreach (has[i]) has[i] = 0;
    #12 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int s, e;
      bit exp_conf;
      @(negedge clk);
      clear = (n == 2500);
      ev_miss = 1'($urandom);
      s = $urandom % 64;
      miss_set = SET_W'(s * 29);
      miss_tag = (1'($urandom) && has[s]) ? last[s] : TAG_W'($urandom % 6);
      ev_evict = 1'($urandom);
      e = $urandom % 64;
      evict_set = SET_W'(e * 29);
      evict_tag = TAG_W'($urandom % 6);
      #1;
      exp_conf = has[s] && last[s][PTAG_W-1:0] == miss_tag[PTAG_W-1:0];
      if (ev_miss) cmp("is_conflict", int'(is_conflict), int'(exp_conf));
      if (clear) begin
        foreach (has[i]) has[i] = 0;
        n_conf = 0; n_cap = 0;
      end else begin
        if (ev_miss && exp_conf) begin n_conf++; n_conf_total++; end
        else if (ev_miss) n_cap++;
        if (ev_evict) begin has[e] = 1; last[e] = evict_tag; end
      end
      @(posedge clk); #1;
      cmp("conflict misses", int'(conflict_misses), n_conf);
      cmp("capacity misses", int'(capacity_misses), n_cap);
    end
    cmp("conflict misses seen", int'(n_conf_total > 100), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
