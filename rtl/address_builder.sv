// address_builder: rebuilds a byte address from tag, set index and word offset
// for the cache's current configuration.
//
// Used for the address of a dirty line written back on eviction or during a
// reconfiguration (offset zero), and by the snooper to step through lines.
// As in address_splitter, every (off_bits, grp_bits) pair gets its own constant
// concatenation, and the current pair selects one; no variable bit slices.
// Purely combinational. Input field widths match address_splitter.
module address_builder
  import cache_pkg::*;
#(
  parameter int LOG_L        = 8,
  parameter int MAX_GRP_BITS = 3,
  parameter int MAX_OFF      = 4,
  parameter int OW           = (MAX_OFF > 0) ? MAX_OFF : 1,
  parameter int SET_W        = LOG_L + MAX_GRP_BITS,
  parameter int TAG_W        = 30 - LOG_L
) (
  input  logic [TAG_W-1:0]  tag,
  input  logic [SET_W-1:0]  set,
  input  logic [OW-1:0]     word,
  input  cfg_t              cfg,
  output logic [ADDR_W-1:0] addr
);

  logic [ADDR_W-1:0] addr_c [MAX_OFF+1][MAX_GRP_BITS+1];

  for (genvar o = 0; o <= MAX_OFF; o++) begin : g_off
    for (genvar g = 0; g <= MAX_GRP_BITS; g++) begin : g_grp
      localparam int IB = LOG_L + g;
      localparam int TB = ADDR_W - 2 - o - IB;  // tag bits in this configuration
      if (o == 0) begin : g_nw
        assign addr_c[o][g] = {tag[TB-1:0], set[IB-1:0], 2'b00};
      end else begin : g_w
        assign addr_c[o][g] = {tag[TB-1:0], set[IB-1:0], word[o-1:0], 2'b00};
      end
    end
  end

  always_comb begin
    addr = '0;
    for (int o = 0; o <= MAX_OFF; o++)
      for (int g = 0; g <= MAX_GRP_BITS; g++)
        if (int'(cfg.off_bits) == o && int'(cfg.grp_bits) == g) addr = addr_c[o][g];
  end

endmodule
