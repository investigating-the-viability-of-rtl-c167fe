// perf_counters: the cache's hardware performance counters.
//
// Counted, one per cycle or per event (all 32-bit, wrapping):
//   requests        processor requests answered
//   hits            lookups that found the line (first lookup of a request)
//   cycles          clock cycles
//   coh_ops         invalidations and write-backs done by the snooper
//   wait_bus        cycles waiting for the bus grant
//   wait_mem        cycles waiting for read data from the level below
//   wait_shared_wr  cycles waiting for other caches to drop a line before a
//                   write to a Shared line
//   write_backs     dirty lines written back (evictions and reconfiguration)
//   wait_miss       cycles a request waits on a miss
//   rc_cycles       length of the latest reconfiguration (restarts with each)
// All counters but rc_cycles restart when `clear` pulses (the end of a
// reconfiguration), so they describe the current configuration only. The
// counter list follows the design; the 32-bit width is this design's choice.
module perf_counters (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        ev_req,
  input  logic        ev_hit,
  input  logic        ev_coh,
  input  logic        wait_bus_i,
  input  logic        wait_mem_i,
  input  logic        wait_shared_wr_i,
  input  logic        ev_wb,
  input  logic        wait_miss_i,
  input  logic        rc_busy,
  output logic [31:0] requests,
  output logic [31:0] hits,
  output logic [31:0] cycles,
  output logic [31:0] coh_ops,
  output logic [31:0] wait_bus,
  output logic [31:0] wait_mem,
  output logic [31:0] wait_shared_wr,
  output logic [31:0] write_backs,
  output logic [31:0] wait_miss,
  output logic [31:0] rc_cycles
);

  logic rc_busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      requests <= '0; hits <= '0; cycles <= '0; coh_ops <= '0; wait_bus <= '0;
      wait_mem <= '0; wait_shared_wr <= '0; write_backs <= '0; wait_miss <= '0;
      rc_cycles <= '0; rc_busy_q <= 1'b0;
    end else begin
      rc_busy_q <= rc_busy;
      if (clear) begin
        requests <= '0; hits <= '0; cycles <= '0; coh_ops <= '0; wait_bus <= '0;
        wait_mem <= '0; wait_shared_wr <= '0; write_backs <= '0; wait_miss <= '0;
      end else begin
        requests       <= requests + 32'(ev_req);
        hits           <= hits + 32'(ev_hit);
        cycles         <= cycles + 1'b1;
        coh_ops        <= coh_ops + 32'(ev_coh);
        wait_bus       <= wait_bus + 32'(wait_bus_i);
        wait_mem       <= wait_mem + 32'(wait_mem_i);
        wait_shared_wr <= wait_shared_wr + 32'(wait_shared_wr_i);
        write_backs    <= write_backs + 32'(ev_wb);
        wait_miss      <= wait_miss + 32'(wait_miss_i);
      end
      if (rc_busy && !rc_busy_q) rc_cycles <= 32'd1;
      else if (rc_busy) rc_cycles <= rc_cycles + 1'b1;
    end
  end

endmodule
