// promotion_unit: the promotion test made in the third pipeline stage.
//
// When a level-4 group (the 32 children of one 19-bit prefix) has exactly one
// used child, the table builder copies that child's next hop and its 5-bit
// offset inside the group into the parent entry at level 3 and sets both flag
// bits of that entry (a combination plain entries never use). A lookup that
// reads such an entry compares address bits 12..8 with the stored offset; on
// a match the next hop is known at level 3 and the level-4 access is saved.
//
// Purely combinational. promoted: the entry carries a promoted child.
// match: promoted and the offset equals the address bits, nh then holds the
// promoted next hop widened to the common next-hop width. The published design
// does not say what happens on a mismatch; here the enclosing stage then
// follows the entry's index field to level 4 like any index entry.
module promotion_unit
  import rl_pkg::*;
(
  input  l3_entry_t                entry,
  input  logic [PROMO_OFF_W-1:0]   addr_bits,  // address bits 12..8
  output logic                     promoted,
  output logic                     match,
  output logic [NH_W-1:0]          nh
);

  always_comb begin
    promoted = entry.valid && entry.index;
    match    = promoted && (entry.offset == addr_bits);
    nh       = NH_W'(entry.nh);
  end

endmodule
