// tb_replacement_controller: self-checking testbench for the true-LRU
// replacement controller.
// For 1, 2, 4 and 8 ways it clears the rank table with the line-clear walk,
// then issues 3000 random touches over a few sets (in several groups) and,
// after every touch, checks the victim the controller names against a
// reference LRU list kept in the testbench: the first invalid way when a set
// is not full, else the least recently used way. The published design names LRU as the
// replacement policy; the rank encoding is this design's choice.
module tb_replacement_controller;
  localparam int LOG_L = 8, MAX_SETS = 2048, MAX_WAYS = 8;
  localparam int SET_W = $clog2(MAX_SETS), WW = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] way_bits;
  logic [SET_W-1:0] rd_set, touch_set;
  logic [MAX_WAYS-1:0] valid;
  logic [WW-1:0] victim, touch_way;
  logic touch, clr_line;
  logic [LOG_L-1:0] clr_idx;

  replacement_controller #(.LOG_L(LOG_L), .MAX_SETS(MAX_SETS), .MAX_WAYS(MAX_WAYS)) dut (.*);

  int age [16][MAX_WAYS];   // reference: last-use time per way (bigger = newer)
  int now;

  function automatic logic [SET_W-1:0] set_of(input int i);
    return SET_W'(((i % 4) << LOG_L) + (i / 4) * 37);
  endfunction

  initial begin
    #5000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    touch = 0; clr_line = 0; clr_idx = 0; valid = '1; rd_set = 0; touch_set = 0; touch_way = 0;
    for (int wb = 0; wb <= 3; wb++) begin
      int ways;
      ways = 1 << wb;
      way_bits = 3'(wb);
      for (int i = 0; i < (1 << LOG_L); i++) begin
        @(negedge clk); clr_line = 1; clr_idx = LOG_L'(i);
      end
      @(negedge clk); clr_line = 0;
      now = 0;
      // after the clear way w has rank w: way 0 newest, way ways-1 oldest
      for (int s = 0; s < 16; s++) for (int w = 0; w < MAX_WAYS; w++) age[s][w] = -w;
      for (int n = 0; n < 3000; n++) begin
        int s, lru, exp;
        s = $urandom % 16;
        @(negedge clk);
        // check the victim of set s
        rd_set = set_of(s);
        valid = '1;
        if ($urandom % 4 == 0) valid[$urandom % ways] = 1'b0;
        #1;
        exp = -1;
        for (int w = 0; w < ways; w++) if (!valid[w] && exp < 0) exp = w;
        if (exp < 0) begin
          lru = 0;
          for (int w = 1; w < ways; w++) if (age[s][w] < age[s][lru]) lru = w;
          exp = lru;
        end
        checks++;
        if (int'(victim) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL ways %0d set %0d victim %0d exp %0d", ways, s, victim, exp);
        end
        // touch a way of set s (usually the victim, as on a fill)
        touch = 1; touch_set = set_of(s);
        touch_way = (1'($urandom)) ? victim : WW'($urandom % ways);
        now++;
        age[s][touch_way] = now;
      end
      @(negedge clk); touch = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
