// single_output_engine: five-level lookup engine with one result per cycle.
//
// Longest-prefix match of an IPv4 destination address against a forwarding
// table stored as a five-level prefix tree (prefix lengths 8, 16, 19, 24, 32),
// one memory bank per level. Each lookup walks the five pipeline stages in
// order. Stage k reads level k at {segment from level k-1, address field k}
// and decides with lookup_stage; once a stage finds a valid entry (or an entry
// with neither flag, meaning no route) the result flows through the remaining
// stages unchanged and no later bank is read for it. Every lookup therefore
// leaves after exactly five cycles, and a new one may enter every cycle.
//
// Interface: in_valid/in_addr/in_tag enter a lookup (no backpressure). The
// result appears on out_valid/out_result five clock cycles after in_valid was
// sampled; out_result.hit=0 means no route. tbl_wr_* writes one entry of the
// bank selected by tbl_wr_level (1..5); the entry is in tbl_wr_data's low bits
// in the formats of rl_pkg. With PROMOTION=1 a promoted level-3 entry that
// matches ends the search at level 3 (the result still leaves at cycle five).
// promo_hit/promo_miss pulse when stage 3 meets a promoted entry.
//
// The staging, the field split, the entry formats and the pass-through of an
// earlier result follow the published design; synchronous one-cycle memories,
// the tag, and the download port are this design's choices. All pipeline
// registers are reset to empty slots.
module single_output_engine
  import rl_pkg::*;
#(
  parameter bit PROMOTION = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // lookup request
  input  logic                  in_valid,
  input  logic [ADDR_W-1:0]     in_addr,
  input  logic [TAG_W-1:0]      in_tag,
  // forwarding-table download
  input  logic                  tbl_wr_en,
  input  logic [2:0]            tbl_wr_level,
  input  logic [MEM_AW_MAX-1:0] tbl_wr_addr,
  input  logic [MEM_DW_MAX-1:0] tbl_wr_data,
  // lookup result
  output logic                  out_valid,
  output result_t               out_result,
  output logic                  promo_hit,
  output logic                  promo_miss
);

  slot_t                 s    [1:LEVELS];   // pipeline registers
  slot_t                 so   [1:LEVELS];   // after each stage's decision
  logic                  re   [1:LEVELS+1]; // read enable of level k
  logic [MEM_AW_MAX-1:0] ra   [1:LEVELS+1]; // read address of level k
  logic [MEM_DW_MAX-1:0] q    [1:LEVELS];   // data read from level k
  logic                  resolved [1:LEVELS];
  logic                  ph   [1:LEVELS];
  logic                  pm   [1:LEVELS];

  assign re[1] = in_valid;
  assign ra[1] = MEM_AW_MAX'(in_addr[field_lsb(1) +: field_w(1)]);

  for (genvar k = 1; k <= LEVELS; k++) begin : g_lvl
    localparam int unsigned AW = mem_aw(k);
    localparam int unsigned DW = mem_dw(k);
    logic [DW-1:0] rd;

    level_mem #(.AW(AW), .DW(DW)) u_mem (
      .clk    (clk),
      .rd_en  (re[k]),
      .rd_addr(ra[k][AW-1:0]),
      .rd_data(rd),
      .wr_en  (tbl_wr_en && (tbl_wr_level == 3'(k))),
      .wr_addr(tbl_wr_addr[AW-1:0]),
      .wr_data(tbl_wr_data[DW-1:0])
    );
    assign q[k] = MEM_DW_MAX'(rd);

    lookup_stage #(.LEVEL(k), .PROMOTION(PROMOTION)) u_stage (
      .s_in      (s[k]),
      .q         (q[k]),
      .s_out     (so[k]),
      .rd_en     (re[k+1]),
      .rd_addr   (ra[k+1]),
      .resolved  (resolved[k]),
      .promo_hit (ph[k]),
      .promo_miss(pm[k])
    );
  end

  // Pipeline registers: every lookup moves one stage per cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= LEVELS; k++) s[k] <= '0;
      out_valid  <= 1'b0;
      out_result <= '0;
    end else begin
      s[1] <= '{busy: in_valid, tag: in_tag, addr: in_addr, default: '0};
      for (int k = 2; k <= LEVELS; k++) s[k] <= so[k-1];
      out_valid  <= so[LEVELS].busy;
      out_result <= '{tag: so[LEVELS].tag, addr: so[LEVELS].addr, hit: so[LEVELS].hit,
                      nh: so[LEVELS].nh, level: so[LEVELS].level};
    end
  end

  // Every lookup is decided by the time it leaves stage 5.
  a_decided: assert property (@(posedge clk) disable iff (!rst_n)
    so[LEVELS].busy |-> (so[LEVELS].done && so[LEVELS].level != '0));

  assign promo_hit  = ph[3];
  assign promo_miss = pm[3];

endmodule
