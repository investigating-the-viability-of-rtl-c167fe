// address_splitter: splits a byte address into word offset, set index and tag
// for the cache's current configuration.
//
// The widths of the three fields move with the configuration: the word offset
// has off_bits bits above the two byte-select bits, the set index LOG_L+grp_bits
// bits above that, and the tag is everything left. Variable shifts are avoided:
// one constant bit slicing is generated for every (off_bits, grp_bits) pair and
// the current pair selects among them, which is the nested-generate approach the
// design calls for. Purely combinational. Outputs are zero-extended to the
// widest field: WORD_OW, SET_W = LOG_L+MAX_GRP_BITS and TAG_W = 30-LOG_L.
module address_splitter
  import cache_pkg::*;
#(
  parameter int LOG_L        = 8,
  parameter int MAX_GRP_BITS = 3,
  parameter int MAX_OFF      = 4,
  parameter int OW           = (MAX_OFF > 0) ? MAX_OFF : 1,
  parameter int SET_W        = LOG_L + MAX_GRP_BITS,
  parameter int TAG_W        = 30 - LOG_L
) (
  input  logic [ADDR_W-1:0] addr,
  input  cfg_t              cfg,
  output logic [OW-1:0]     word,
  output logic [SET_W-1:0]  set,
  output logic [TAG_W-1:0]  tag
);

  logic [OW-1:0]    word_c [MAX_OFF+1];
  logic [SET_W-1:0] set_c  [MAX_OFF+1][MAX_GRP_BITS+1];
  logic [TAG_W-1:0] tag_c  [MAX_OFF+1][MAX_GRP_BITS+1];

  for (genvar o = 0; o <= MAX_OFF; o++) begin : g_off
    if (o == 0) begin : g_nw
      assign word_c[o] = '0;
    end else begin : g_w
      assign word_c[o] = OW'(addr[2 +: o]);
    end
    for (genvar g = 0; g <= MAX_GRP_BITS; g++) begin : g_grp
      localparam int IB = LOG_L + g;         // index bits
      localparam int TL = 2 + o + IB;        // lowest tag bit
      assign set_c[o][g] = SET_W'(addr[2 + o +: IB]);
      assign tag_c[o][g] = TAG_W'(addr[ADDR_W-1:TL]);
    end
  end

  always_comb begin
    word = '0;
    set  = '0;
    tag  = '0;
    for (int o = 0; o <= MAX_OFF; o++)
      if (int'(cfg.off_bits) == o) begin
        word = word_c[o];
        for (int g = 0; g <= MAX_GRP_BITS; g++)
          if (int'(cfg.grp_bits) == g) begin
            set = set_c[o][g];
            tag = tag_c[o][g];
          end
      end
  end

endmodule
