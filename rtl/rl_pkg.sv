// rl_pkg: shared constants, entry formats and pipeline types of the
// five-level IPv4 route lookup engines.
//
// The 32-bit destination address is cut into five fields, one per level of
// the prefix tree: bits 31..24, 23..16, 15..13, 12..8 and 7..0, so the levels
// hold prefixes of length 8, 16, 19, 24 and 32. Level 1 is indexed by its
// field alone; every deeper level is indexed by {segment, field}, where the
// segment is the 14-bit pointer read from the level above.
//
// Entry formats (widths follow the published formats):
//   levels 1, 2, 4 : {valid, index, ptr[13:0]}                       16 bits
//   level 3        : {valid, index, ptr[13:0], nh[10:0], offset[4:0]} 32 bits
//                    {1,1,...} marks a promoted entry (see promotion_unit);
//                    a plain entry leaves nh and offset at zero.
//   level 5        : {valid, nh[6:0]}                                  8 bits
// valid=1: ptr is the next-hop index. index=1: ptr is the segment of the
// next level. Both 0: no route. Both 1 is only legal at level 3 (promotion).
// The bit order inside the 2-bit flag field is this design's choice.
package rl_pkg;

  localparam int unsigned ADDR_W      = 32;  // IPv4 destination address
  localparam int unsigned LEVELS      = 5;
  localparam int unsigned PTR_W       = 14;  // segment / next-hop index
  localparam int unsigned NH_W        = PTR_W;
  localparam int unsigned L5_NH_W     = 7;   // level-5 entry: 1 valid + 7
  localparam int unsigned PROMO_NH_W  = 11;  // promoted next hop
  localparam int unsigned PROMO_OFF_W = 5;   // promoted offset (bits 12..8)
  localparam int unsigned TAG_W       = 8;   // caller's packet tag
  localparam int unsigned MEM_AW_MAX  = 22;  // widest level address
  localparam int unsigned MEM_DW_MAX  = 32;  // widest level entry

  // Field of the address that indexes level `lvl` (1..5).
  function automatic int unsigned field_lsb(int unsigned lvl);
    case (lvl)
      1:       return 24;
      2:       return 16;
      3:       return 13;
      4:       return 8;
      default: return 0;
    endcase
  endfunction

  function automatic int unsigned field_w(int unsigned lvl);
    case (lvl)
      1:       return 8;
      2:       return 8;
      3:       return 3;
      4:       return 5;
      default: return 8;
    endcase
  endfunction

  // Address width of the memory bank of level `lvl`.
  function automatic int unsigned mem_aw(int unsigned lvl);
    return (lvl == 1) ? field_w(1) : PTR_W + field_w(lvl);
  endfunction

  // Entry width of the memory bank of level `lvl`.
  function automatic int unsigned mem_dw(int unsigned lvl);
    case (lvl)
      3:       return 32;
      5:       return 8;
      default: return 16;
    endcase
  endfunction

  typedef struct packed {
    logic             valid;
    logic             index;
    logic [PTR_W-1:0] ptr;
  } entry_t;

  typedef struct packed {
    logic                   valid;
    logic                   index;
    logic [PTR_W-1:0]       ptr;
    logic [PROMO_NH_W-1:0]  nh;
    logic [PROMO_OFF_W-1:0] offset;
  } l3_entry_t;

  typedef struct packed {
    logic               valid;
    logic [L5_NH_W-1:0] nh;
  } l5_entry_t;

  // One pipeline register ("IP address pipeline register").
  typedef struct packed {
    logic              busy;   // slot holds a lookup
    logic [TAG_W-1:0]  tag;
    logic [ADDR_W-1:0] addr;
    logic              done;   // result decided (the dropped bit)
    logic              hit;    // a route was found
    logic [NH_W-1:0]   nh;     // next-hop index when hit
    logic [2:0]        level;  // level that decided the result
  } slot_t;

  // A lookup result as it leaves an engine.
  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [ADDR_W-1:0] addr;
    logic              hit;
    logic [NH_W-1:0]   nh;
    logic [2:0]        level;
  } result_t;

endpackage
