// eviction_table: hardware detector for prime+probe-like behaviour.
//
// Priming a W-way set evicts about W lines from that one set. The table keeps
// the N_ENT sets that most recently had a line evicted, each with an eviction
// count and the time of its latest eviction. On an eviction from set x the
// entries are read one per cycle, as from a small RAM (N_ENT cycles, which must
// fit inside the time the cache spends fetching the missing line):
//   x found     -> its count goes up and it becomes the most recent entry
//   x not found -> it replaces the least recently evicted entry, count 1
// An entry whose count reaches W_THR marks its set as suspicious; when K_THR
// entries are suspicious at once, `attack` rises and stays high until `clear`
// (pulsed when the cache has reconfigured). The time stamp stands in for
// moving the entry to the top of a stack. One eviction arriving while a search
// runs is held; further ones are dropped and counted in `dropped`.
// Table behaviour follows the design; N_ENT, W_THR and K_THR are left to be
// tuned there, and the values here are this design's own.
module eviction_table #(
  parameter int SET_W = 11,
  parameter int N_ENT = 8,
  parameter int W_THR = 8,
  parameter int K_THR = 4,
  parameter int CW    = $clog2(W_THR + 1),
  parameter int EW    = (N_ENT > 1) ? $clog2(N_ENT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             ev_evict,
  input  logic [SET_W-1:0] evict_set,
  output logic             attack,
  output logic [EW:0]      suspicious,
  output logic             busy,
  output logic [15:0]      dropped
);

  logic [SET_W-1:0] e_set  [N_ENT];
  logic [CW-1:0]    e_cnt  [N_ENT];
  logic [15:0]      e_time [N_ENT];
  logic [N_ENT-1:0] e_val;

  logic [15:0]      now;
  logic             searching, pend;
  logic [SET_W-1:0] cur_set, pend_set;
  logic [EW:0]      idx;
  logic             found;
  logic [EW-1:0]    hit_idx, old_idx;
  logic [15:0]      old_time;
  logic             old_free;

  assign busy   = searching;
  assign attack = int'(suspicious) >= K_THR;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_val      <= '0;
      now        <= '0;
      searching  <= 1'b0;
      pend       <= 1'b0;
      cur_set    <= '0;
      pend_set   <= '0;
      idx        <= '0;
      found      <= 1'b0;
      hit_idx    <= '0;
      old_idx    <= '0;
      old_time   <= '0;
      old_free   <= 1'b0;
      suspicious <= '0;
      dropped    <= '0;
      for (int i = 0; i < N_ENT; i++) begin
        e_set[i]  <= '0;
        e_cnt[i]  <= '0;
        e_time[i] <= '0;
      end
    end else if (clear) begin
      e_val      <= '0;
      searching  <= 1'b0;
      pend       <= 1'b0;
      suspicious <= '0;
    end else begin
      now <= now + 1'b1;
      // accept / hold incoming evictions
      if (ev_evict) begin
        if (!searching && !pend) begin
          searching <= 1'b1;
          cur_set   <= evict_set;
          idx       <= '0;
          found     <= 1'b0;
          old_free  <= 1'b0;
          old_time  <= '1;
          old_idx   <= '0;
        end else if (!pend) begin
          pend     <= 1'b1;
          pend_set <= evict_set;
        end else dropped <= dropped + 1'b1;
      end
      if (!searching && pend) begin
        searching <= 1'b1;
        pend      <= 1'b0;
        cur_set   <= pend_set;
        idx       <= '0;
        found     <= 1'b0;
        old_free  <= 1'b0;
        old_time  <= '1;
        old_idx   <= '0;
      end
      if (searching) begin
        if (int'(idx) < N_ENT) begin
          // read one entry
          if (e_val[idx[EW-1:0]] && e_set[idx[EW-1:0]] == cur_set) begin
            found   <= 1'b1;
            hit_idx <= idx[EW-1:0];
          end
          if (!old_free) begin
            if (!e_val[idx[EW-1:0]]) begin
              old_free <= 1'b1;
              old_idx  <= idx[EW-1:0];
            end else if ((now - e_time[idx[EW-1:0]]) >= (now - old_time) || idx == '0) begin
              old_idx  <= idx[EW-1:0];
              old_time <= e_time[idx[EW-1:0]];
            end
          end
          idx <= idx + 1'b1;
        end else begin
          // update
          if (found) begin
            e_time[hit_idx] <= now;
            if (int'(e_cnt[hit_idx]) < W_THR) begin
              e_cnt[hit_idx] <= e_cnt[hit_idx] + 1'b1;
              if (int'(e_cnt[hit_idx]) == W_THR - 1) suspicious <= suspicious + 1'b1;
            end
          end else begin
            if (e_val[old_idx] && int'(e_cnt[old_idx]) >= W_THR) suspicious <= suspicious - 1'b1;
            e_val[old_idx]  <= 1'b1;
            e_set[old_idx]  <= cur_set;
            e_cnt[old_idx]  <= CW'(1);
            e_time[old_idx] <= now;
          end
          if (pend) begin
            pend     <= 1'b0;
            cur_set  <= pend_set;
            idx      <= '0;
            found    <= 1'b0;
            old_free <= 1'b0;
            old_time <= '1;
            old_idx  <= '0;
          end else searching <= 1'b0;
        end
      end
    end
  end

endmodule
