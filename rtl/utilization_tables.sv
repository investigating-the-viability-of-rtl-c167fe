// utilization_tables: how many lines each set and each way currently holds.
//
// Set table: one counter per set (sized for the largest set count), counting
// up to MAX_WAYS, so log2(MAX_WAYS)+1 bits. Way table: one counter per way,
// counting up to the largest set count, log2(MAX_SETS)+1 bits. A line installed
// in (set, way) increments both; a line evicted, or invalidated by the snooper,
// decrements both (both may happen in one cycle). clr_line zeroes the set
// entries whose low LOG_L bits equal clr_idx, and the whole way table; the
// cache's initialisation walk drives it, so after reset or a reconfiguration
// both tables are zero, as an invalidation of every line would leave them.
// A scanner steps through the sets of the current configuration, one per
// cycle, counts those holding no line, and at the end of each sweep publishes
// the count on unused_sets and pulses scan_done. Tables and scanner follow the
// design; update and clear timing are this design's own.
module utilization_tables #(
  parameter int LOG_L    = 8,
  parameter int SET_W    = 11,
  parameter int MAX_WAYS = 8,
  parameter int WW       = (MAX_WAYS > 1) ? $clog2(MAX_WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       grp_bits,
  input  logic             clr_line,
  input  logic [LOG_L-1:0] clr_idx,
  input  logic             inc,
  input  logic [SET_W-1:0] inc_set,
  input  logic [WW-1:0]    inc_way,
  input  logic             dec_a,
  input  logic [SET_W-1:0] dec_a_set,
  input  logic [WW-1:0]    dec_a_way,
  input  logic             dec_b,
  input  logic [SET_W-1:0] dec_b_set,
  input  logic [WW-1:0]    dec_b_way,
  output logic [WW:0]      set_util [1 << SET_W],
  output logic [SET_W:0]   way_util [MAX_WAYS],
  output logic [SET_W:0]   unused_sets,
  output logic             scan_done
);

  localparam int MAX_SETS = 1 << SET_W;

  // The controller never installs and evicts in the same cycle (inc and dec_a
  // are exclusive); a snooper invalidation (dec_b) may coincide with either.
  always_ff @(posedge clk) begin
    if (clr_line) begin
      for (int g = 0; g < MAX_SETS >> LOG_L; g++) set_util[(g << LOG_L) + int'(clr_idx)] <= '0;
    end else begin
      logic dec_b_same;
      dec_b_same = dec_b && ((inc && inc_set == dec_b_set) || (dec_a && dec_a_set == dec_b_set));
      if (inc && !dec_b_same) set_util[inc_set] <= set_util[inc_set] + 1'b1;
      if (dec_a) begin
        if (dec_b_same) set_util[dec_a_set] <= sat_dec(set_util[dec_a_set], 2);
        else            set_util[dec_a_set] <= sat_dec(set_util[dec_a_set], 1);
      end
      if (dec_b && !dec_b_same) set_util[dec_b_set] <= sat_dec(set_util[dec_b_set], 1);
    end
  end

  function automatic logic [WW:0] sat_dec(input logic [WW:0] v, input int n);
    return (int'(v) > n) ? v - (WW+1)'(n) : '0;
  endfunction

  assert property (@(posedge clk) !(inc && dec_a))
    else $error("utilization_tables: install and eviction in the same cycle");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < MAX_WAYS; w++) way_util[w] <= '0;
    end else if (clr_line) begin
      for (int w = 0; w < MAX_WAYS; w++) way_util[w] <= '0;
    end else begin
      for (int w = 0; w < MAX_WAYS; w++) begin
        logic [SET_W:0] v;
        v = way_util[w];
        if (inc && int'(inc_way) == w) v = v + 1'b1;
        if (dec_a && int'(dec_a_way) == w && v != '0) v = v - 1'b1;
        if (dec_b && int'(dec_b_way) == w && v != '0) v = v - 1'b1;
        way_util[w] <= v;
      end
    end
  end

  // scanner
  logic [SET_W:0] scan_idx, scan_cnt;
  int nsets;
  assign nsets = (1 << LOG_L) << grp_bits;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_idx    <= '0;
      scan_cnt    <= '0;
      unused_sets <= '0;
      scan_done   <= 1'b0;
    end else begin
      scan_done <= 1'b0;
      if (clr_line) begin
        scan_idx <= '0;
        scan_cnt <= '0;
      end else if (int'(scan_idx) >= nsets - 1) begin
        unused_sets <= scan_cnt + (SET_W+1)'(set_util[scan_idx[SET_W-1:0]] == '0);
        scan_done   <= 1'b1;
        scan_idx    <= '0;
        scan_cnt    <= '0;
      end else begin
        scan_cnt <= scan_cnt + (SET_W+1)'(set_util[scan_idx[SET_W-1:0]] == '0);
        scan_idx <= scan_idx + 1'b1;
      end
    end
  end

endmodule
