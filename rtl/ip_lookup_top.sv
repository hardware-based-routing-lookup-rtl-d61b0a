// ip_lookup_top: the two five-level IPv4 route lookup engines side by side.
//
// Both engines search the same kind of forwarding table: a prefix tree cut
// into five levels (prefix lengths 8, 16, 19, 24 and 32), each level in a
// memory bank of its own, with the level-3 promotion of single-child groups.
// The single-output engine returns every lookup after a fixed five cycles;
// the multiple-output engine lets a lookup leave at the stage that resolves
// it, so several results may appear in the same cycle.
//
// The network processor downloads the forwarding table through one write port
// (tbl_wr_*), which writes the same entry into both engines, so both always
// hold the same table. Each engine has its own lookup request and result
// ports; see single_output_engine and multi_output_engine for their timing.
// Putting both engines in one top with a shared download port is this
// design's choice; the published design presents them as two alternative
// engines built on the same table.
module ip_lookup_top
  import rl_pkg::*;
#(
  parameter bit          PROMOTION = 1'b1,
  parameter int unsigned BUF_DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // forwarding-table download, written into both engines
  input  logic                  tbl_wr_en,
  input  logic [2:0]            tbl_wr_level,
  input  logic [MEM_AW_MAX-1:0] tbl_wr_addr,
  input  logic [MEM_DW_MAX-1:0] tbl_wr_data,
  // single-output engine
  input  logic                  so_in_valid,
  input  logic [ADDR_W-1:0]     so_in_addr,
  input  logic [TAG_W-1:0]      so_in_tag,
  output logic                  so_out_valid,
  output result_t               so_out_result,
  output logic                  so_promo_hit,
  output logic                  so_promo_miss,
  // multiple-output engine
  input  logic                  mo_in_valid,
  output logic                  mo_in_ready,
  input  logic [ADDR_W-1:0]     mo_in_addr,
  input  logic [TAG_W-1:0]      mo_in_tag,
  output logic [LEVELS-1:0]     mo_res_valid,
  output result_t               mo_res [LEVELS],
  output logic                  mo_promo_hit,
  output logic                  mo_promo_miss,
  output logic [$clog2(BUF_DEPTH):0] mo_buf_level
);

  single_output_engine #(.PROMOTION(PROMOTION)) u_single (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (so_in_valid),
    .in_addr     (so_in_addr),
    .in_tag      (so_in_tag),
    .tbl_wr_en   (tbl_wr_en),
    .tbl_wr_level(tbl_wr_level),
    .tbl_wr_addr (tbl_wr_addr),
    .tbl_wr_data (tbl_wr_data),
    .out_valid   (so_out_valid),
    .out_result  (so_out_result),
    .promo_hit   (so_promo_hit),
    .promo_miss  (so_promo_miss)
  );

  multi_output_engine #(.PROMOTION(PROMOTION), .BUF_DEPTH(BUF_DEPTH)) u_multi (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (mo_in_valid),
    .in_ready    (mo_in_ready),
    .in_addr     (mo_in_addr),
    .in_tag      (mo_in_tag),
    .tbl_wr_en   (tbl_wr_en),
    .tbl_wr_level(tbl_wr_level),
    .tbl_wr_addr (tbl_wr_addr),
    .tbl_wr_data (tbl_wr_data),
    .res_valid   (mo_res_valid),
    .res         (mo_res),
    .promo_hit   (mo_promo_hit),
    .promo_miss  (mo_promo_miss),
    .buf_level   (mo_buf_level)
  );

endmodule
