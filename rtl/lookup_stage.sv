// lookup_stage: the decision logic of one level of the lookup pipeline.
//
// It sits between the pipeline register of level LEVEL (with the data just
// read from that level's memory bank) and the pipeline register of the next
// level. For a lookup that is still open it decodes the entry:
//   valid set            -> route found, the entry's pointer is the next hop;
//   index set            -> read the next level at {pointer, next field};
//   both clear           -> no route; the lookup is finished with a miss;
//   both set (level 3,   -> promoted entry: if address bits 12..8 equal its
//   PROMOTION=1)            offset the promoted next hop is the result,
//                           otherwise the index is followed to level 4.
// A lookup that was finished earlier passes through unchanged, which is the
// multiplexer that keeps the earlier pointer in the single-output engine; the
// OR of "found" and "no route" into the done bit is the dropped bit of the
// multiple-output engine. Level 5 entries have no index: valid or no route.
//
// Purely combinational. The multiplexer/OR structure and the entry formats
// follow the published design; the level that decided a lookup is carried
// along only so that results can be checked and counted.
module lookup_stage
  import rl_pkg::*;
#(
  parameter int unsigned LEVEL     = 1,
  parameter bit          PROMOTION = 1'b1
) (
  input  slot_t                  s_in,
  input  logic [MEM_DW_MAX-1:0]  q,          // entry read from this level
  output slot_t                  s_out,
  output logic                   rd_en,      // read the next level
  output logic [MEM_AW_MAX-1:0]  rd_addr,
  output logic                   resolved,   // decided at this level now
  output logic                   promo_hit,
  output logic                   promo_miss
);

  localparam int unsigned NL = (LEVEL < LEVELS) ? LEVEL + 1 : LEVELS;
  localparam int unsigned NF_LSB = field_lsb(NL);
  localparam int unsigned NF_W   = field_w(NL);
  localparam int unsigned DW     = mem_dw(LEVEL);
  // Level 5 has 8-bit entries; its 16-bit view is never used.
  localparam int unsigned EMSB   = (DW < $bits(entry_t)) ? $bits(entry_t) - 1 : DW - 1;

  entry_t                 e;
  l5_entry_t              e5;
  logic [NF_W-1:0]        next_field;
  logic                   p_promoted, p_match;
  logic [NH_W-1:0]        p_nh;

  // The flag and pointer fields sit at the top of every 16- or 32-bit entry.
  assign e          = entry_t'(q[EMSB -: $bits(entry_t)]);
  assign e5         = l5_entry_t'(q[$bits(l5_entry_t)-1:0]);
  assign next_field = s_in.addr[NF_LSB +: NF_W];

  if (LEVEL == 3 && PROMOTION) begin : g_promo
    promotion_unit u_promo (
      .entry    (l3_entry_t'(q[$bits(l3_entry_t)-1:0])),
      .addr_bits(s_in.addr[field_lsb(4) +: PROMO_OFF_W]),
      .promoted (p_promoted),
      .match    (p_match),
      .nh       (p_nh)
    );
  end else begin : g_no_promo
    assign p_promoted = 1'b0;
    assign p_match    = 1'b0;
    assign p_nh       = '0;
  end

  always_comb begin
    s_out      = s_in;
    rd_en      = 1'b0;
    rd_addr    = '0;
    resolved   = 1'b0;
    promo_hit  = 1'b0;
    promo_miss = 1'b0;
    if (s_in.busy && !s_in.done) begin
      if (LEVEL == LEVELS) begin
        s_out.done  = 1'b1;
        s_out.hit   = e5.valid;
        s_out.nh    = e5.valid ? NH_W'(e5.nh) : '0;
        s_out.level = 3'(LEVEL);
        resolved    = 1'b1;
      end else if (p_promoted) begin
        if (p_match) begin
          s_out.done  = 1'b1;
          s_out.hit   = 1'b1;
          s_out.nh    = p_nh;
          s_out.level = 3'(LEVEL);
          resolved    = 1'b1;
          promo_hit   = 1'b1;
        end else begin
          rd_en      = 1'b1;
          rd_addr    = MEM_AW_MAX'({e.ptr, next_field});
          promo_miss = 1'b1;
        end
      end else if (e.valid) begin
        s_out.done  = 1'b1;
        s_out.hit   = 1'b1;
        s_out.nh    = e.ptr;
        s_out.level = 3'(LEVEL);
        resolved    = 1'b1;
      end else if (e.index) begin
        rd_en   = 1'b1;
        rd_addr = MEM_AW_MAX'({e.ptr, next_field});
      end else begin
        s_out.done  = 1'b1;
        s_out.hit   = 1'b0;
        s_out.nh    = '0;
        s_out.level = 3'(LEVEL);
        resolved    = 1'b1;
      end
    end
  end

endmodule
