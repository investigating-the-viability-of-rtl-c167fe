// replacement_controller: true LRU replacement for a variable number of ways.
//
// Every set keeps an age rank per way (0 = most recently used), so the storage
// is MAX_WAYS * log2(MAX_WAYS) bits per set for MAX_SETS sets, sized for the
// largest associativity and set count the cache can take; configurations with
// fewer ways simply leave ranks unused. Only the first `ways` ranks of a set are
// looked at. Victim choice: the lowest-numbered empty (invalid) way if there is
// one, otherwise the way whose rank is ways-1. A touch moves the way to rank 0
// and ages every active way that was younger than it.
//   touch      : write, takes effect at the next clock edge
//   clr_line   : resets the ranks of every set whose low LOG_L index bits equal
//                clr_idx (all groups at once) to rank[w] = w; used by the
//                controller's initialisation walk, so no separate reset exists
//   victim     : combinational from rd_set, valid and ways
// Storage size, variable way count and true LRU follow the design; the rank
// encoding and empty-way-first choice are this design's.
module replacement_controller #(
  parameter int LOG_L    = 8,
  parameter int MAX_SETS = 2048,
  parameter int MAX_WAYS = 8,
  parameter int SET_W    = $clog2(MAX_SETS),
  parameter int WW       = (MAX_WAYS > 1) ? $clog2(MAX_WAYS) : 1
) (
  input  logic             clk,
  input  logic [2:0]       way_bits,
  // read / victim
  input  logic [SET_W-1:0] rd_set,
  input  logic [MAX_WAYS-1:0] valid,
  output logic [WW-1:0]    victim,
  // touch
  input  logic             touch,
  input  logic [SET_W-1:0] touch_set,
  input  logic [WW-1:0]    touch_way,
  // clear
  input  logic             clr_line,
  input  logic [LOG_L-1:0] clr_idx
);

  logic [WW-1:0] rank [MAX_SETS][MAX_WAYS];
  int ways;
  assign ways = 1 << way_bits;

  always_comb begin
    logic found;
    found  = 1'b0;
    victim = '0;
    for (int w = 0; w < MAX_WAYS; w++)
      if (w < ways && !valid[w] && !found) begin
        victim = WW'(w);
        found  = 1'b1;
      end
    if (!found)
      for (int w = 0; w < MAX_WAYS; w++)
        if (w < ways && int'(rank[rd_set][w]) == ways - 1) victim = WW'(w);
  end

  always_ff @(posedge clk) begin
    if (clr_line) begin
      for (int g = 0; g < MAX_SETS >> LOG_L; g++)
        for (int w = 0; w < MAX_WAYS; w++) rank[(g << LOG_L) + int'(clr_idx)][w] <= WW'(w);
    end else if (touch) begin
      for (int w = 0; w < MAX_WAYS; w++)
        if (w < ways) begin
          if (WW'(w) == touch_way) rank[touch_set][w] <= '0;
          else if (rank[touch_set][w] < rank[touch_set][touch_way])
            rank[touch_set][w] <= rank[touch_set][w] + 1'b1;
        end
    end
  end

endmodule
