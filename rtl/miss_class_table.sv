// miss_class_table: classifies each miss as a conflict miss or a capacity
// miss (compulsory misses count as capacity).
//
// One entry per set (sized for the largest set count) keeps the low PTAG_W
// bits of the tag last evicted from that set. A miss whose tag matches the
// stored partial tag would have hit with more associativity, so it is a
// conflict miss; any other miss is a capacity miss. Writes (ev_evict) take
// effect at the next edge; a miss (ev_miss) is classified in the same cycle
// (is_conflict) and counted. `clear` empties the table and the two counters
// (after a reconfiguration, when set numbers change meaning). The table
// follows the design; keeping only PTAG_W tag bits, and its value, are this
// design's choice within the partial-tag option the design mentions.
module miss_class_table #(
  parameter int SET_W  = 11,
  parameter int TAG_W  = 22,
  parameter int PTAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             ev_evict,
  input  logic [SET_W-1:0] evict_set,
  input  logic [TAG_W-1:0] evict_tag,
  input  logic             ev_miss,
  input  logic [SET_W-1:0] miss_set,
  input  logic [TAG_W-1:0] miss_tag,
  output logic             is_conflict,
  output logic [31:0]      conflict_misses,
  output logic [31:0]      capacity_misses
);

  localparam int MAX_SETS = 1 << SET_W;
  logic [PTAG_W-1:0]   ptag  [MAX_SETS];
  logic [MAX_SETS-1:0] valid;

  assign is_conflict = valid[miss_set] && ptag[miss_set] == miss_tag[PTAG_W-1:0];

  always_ff @(posedge clk) if (ev_evict) ptag[evict_set] <= evict_tag[PTAG_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid           <= '0;
      conflict_misses <= '0;
      capacity_misses <= '0;
    end else if (clear) begin
      valid           <= '0;
      conflict_misses <= '0;
      capacity_misses <= '0;
    end else begin
      if (ev_evict) valid[evict_set] <= 1'b1;
      if (ev_miss) begin
        if (is_conflict) conflict_misses <= conflict_misses + 1'b1;
        else             capacity_misses <= capacity_misses + 1'b1;
      end
    end
  end

endmodule
