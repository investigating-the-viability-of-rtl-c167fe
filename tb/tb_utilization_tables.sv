// tb_utilization_tables: self-checking testbench for the set and way
// utilization tables and their unused-set scanner.
// After the line-clear walk, random line installs, evictions and snooper
// invalidations (the last may coincide with either of the others) are applied
// over 40 sets in two groups and compared with a reference model of valid
// lines per set and per way. Then the inputs go quiet and the scanner's count
// of sets holding no valid line is compared with the model, for one and for
// two groups of sets. The tables follow the published design's set- and way-
// utilization monitors; the walking scanner is this design's choice.
module tb_utilization_tables;
  localparam int LOG_L = 8, SET_W = 11, MAX_WAYS = 8, WW = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, clr_line, inc, dec_a, dec_b, scan_done;
  logic [2:0] grp_bits;
  logic [LOG_L-1:0] clr_idx;
  logic [SET_W-1:0] inc_set, dec_a_set, dec_b_set;
  logic [WW-1:0] inc_way, dec_a_way, dec_b_way;
  logic [WW:0] set_util [1 << SET_W];
  logic [SET_W:0] way_util [MAX_WAYS];
  logic [SET_W:0] unused_sets;

  utilization_tables #(.LOG_L(LOG_L), .SET_W(SET_W), .MAX_WAYS(MAX_WAYS)) dut (.*);

  int su [40];
  int wu [MAX_WAYS];

  function automatic logic [SET_W-1:0] set_of(input int i);
    return SET_W'(((i % 2) << LOG_L) + (i / 2) * 11);
  endfunction

  task automatic cmp(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d t=%0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #5000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    rst_n = 0; clr_line = 0; clr_idx = 0; inc = 0; dec_a = 0; dec_b = 0; grp_bits = 3'd1;
    inc_set = 0; dec_a_set = 0; dec_b_set = 0; inc_way = 0; dec_a_way = 0; dec_b_way = 0;
    #12 rst_n = 1;
    for (int gb = 1; gb >= 0; gb--) begin
      grp_bits = 3'(gb);
      for (int i = 0; i < (1 << LOG_L); i++) begin
        @(negedge clk); clr_line = 1; clr_idx = LOG_L'(i);
      end
      @(negedge clk); clr_line = 0;
      foreach (su[i]) su[i] = 0;
      foreach (wu[i]) wu[i] = 0;
      for (int n = 0; n < 3000; n++) begin
        int a, b, c;
        @(negedge clk);
        for (int i = 0; i < 40; i++) if (gb == 1 || i % 2 == 0) cmp("set util", int'(set_util[set_of(i)]), su[i]);
        for (int w = 0; w < MAX_WAYS; w++) cmp("way util", int'(way_util[w]), wu[w]);
        a = $urandom % 40; b = $urandom % 40; c = $urandom % 40;
        if (gb == 0) begin a = a & ~1; b = b & ~1; c = c & ~1; end
        if ($urandom % 8 == 0) c = a;
        inc = 0; dec_a = 0;
        if (1'($urandom)) inc = su[a] < 8; else dec_a = 1;
        dec_b = ($urandom % 4) == 0;
        inc_set = set_of(a); dec_a_set = set_of(a); dec_b_set = set_of(c);
        inc_way = WW'($urandom); dec_a_way = WW'($urandom); dec_b_way = WW'($urandom);
        // reference
        if (inc) begin su[a]++; wu[inc_way]++; end
        if (dec_a) begin if (su[a] > 0) su[a]--; if (wu[dec_a_way] > 0) wu[dec_a_way]--; end
        if (dec_b) begin if (su[c] > 0) su[c]--; if (wu[dec_b_way] > 0) wu[dec_b_way]--; end
      end
      @(negedge clk); inc = 0; dec_a = 0; dec_b = 0;
      // two full scans with quiet inputs
      repeat (2) begin
        @(posedge clk iff scan_done);
      end
      @(negedge clk);
      begin
        int unused;
        unused = (256 << gb);
        for (int i = 0; i < 40; i++) if ((gb == 1 || i % 2 == 0) && su[i] != 0) unused--;
        cmp("unused sets", int'(unused_sets), unused);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
