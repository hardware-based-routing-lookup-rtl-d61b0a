// multi_output_engine: five-level lookup engine in which a lookup leaves the
// pipeline at the stage that resolves it.
//
// Same forwarding-table layout and stage decisions as single_output_engine.
// Destination addresses first enter the IP address buffer (ip_addr_buffer);
// the pipeline takes one per cycle from it. Each pipeline register carries a
// dropped bit: when stage k resolves a lookup (valid entry, no-route entry, or
// a matching promoted entry at level 3) the result is written to output port
// k and the lookup is drained, so the following stages see an empty slot and
// read no memory for it. Lookups resolved at different levels can therefore
// leave in the same cycle (several outputs per cycle), and a short prefix is
// answered after fewer memory accesses than a long one.
//
// Interface: in_valid/in_ready/in_addr/in_tag push into the buffer. A lookup
// accepted at a clock edge is taken from the buffer at the next edge when the
// buffer was empty, and its result appears on res_valid[k-1]/res[k-1] k edges
// after that, k being the level that resolved it (1..5). Results of different
// lookups can leave out of order; in_tag identifies them. tbl_wr_* is the
// download port, as in single_output_engine. promo_hit/promo_miss pulse when
// stage 3 meets a promoted entry; buf_level is the buffer occupancy.
//
// The dropped bit, the buffer and the stage-3 promotion follow the published
// design; buffer depth, the tag, synchronous one-cycle memories and one output
// port per stage are this design's choices.
module multi_output_engine
  import rl_pkg::*;
#(
  parameter bit          PROMOTION = 1'b1,
  parameter int unsigned BUF_DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // lookup request into the IP address buffer
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [ADDR_W-1:0]     in_addr,
  input  logic [TAG_W-1:0]      in_tag,
  // forwarding-table download
  input  logic                  tbl_wr_en,
  input  logic [2:0]            tbl_wr_level,
  input  logic [MEM_AW_MAX-1:0] tbl_wr_addr,
  input  logic [MEM_DW_MAX-1:0] tbl_wr_data,
  // one result port per stage
  output logic [LEVELS-1:0]     res_valid,
  output result_t               res [LEVELS],
  output logic                  promo_hit,
  output logic                  promo_miss,
  output logic [$clog2(BUF_DEPTH):0] buf_level
);

  localparam int unsigned BW = ADDR_W + TAG_W;

  slot_t                 s    [1:LEVELS];
  slot_t                 so   [1:LEVELS];
  logic                  re   [1:LEVELS+1];
  logic [MEM_AW_MAX-1:0] ra   [1:LEVELS+1];
  logic [MEM_DW_MAX-1:0] q    [1:LEVELS];
  logic                  resolved [1:LEVELS];
  logic                  ph   [1:LEVELS];
  logic                  pm   [1:LEVELS];

  logic                  b_valid;
  logic [BW-1:0]         b_data;
  logic [ADDR_W-1:0]     b_addr;
  logic [TAG_W-1:0]      b_tag;

  ip_addr_buffer #(.DEPTH(BUF_DEPTH), .W(BW)) u_buf (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_data  ({in_tag, in_addr}),
    .out_valid(b_valid),
    .out_ready(1'b1),
    .out_data (b_data),
    .level_o  (buf_level)
  );
  assign {b_tag, b_addr} = b_data;

  assign re[1] = b_valid;
  assign ra[1] = MEM_AW_MAX'(b_addr[field_lsb(1) +: field_w(1)]);

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

  // A resolved lookup is dropped: the next register receives an empty slot.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= LEVELS; k++) s[k] <= '0;
      res_valid <= '0;
      for (int k = 0; k < LEVELS; k++) res[k] <= '0;
    end else begin
      s[1] <= '{busy: b_valid, tag: b_tag, addr: b_addr, default: '0};
      for (int k = 2; k <= LEVELS; k++) begin
        s[k]      <= so[k-1];
        s[k].busy <= so[k-1].busy && !so[k-1].done;
      end
      for (int k = 1; k <= LEVELS; k++) begin
        res_valid[k-1] <= resolved[k];
        res[k-1]       <= '{tag: so[k].tag, addr: so[k].addr, hit: so[k].hit,
                            nh: so[k].nh, level: so[k].level};
      end
    end
  end

  // A result leaves on the port of the level that decided it, and a lookup
  // still open after stage 5 cannot exist.
  for (genvar k = 0; k < LEVELS; k++) begin : g_chk
    a_port_level: assert property (@(posedge clk) disable iff (!rst_n)
      res_valid[k] |-> (res[k].level == 3'(k + 1)));
  end
  a_no_leftover: assert property (@(posedge clk) disable iff (!rst_n)
    so[LEVELS].busy |-> so[LEVELS].done);

  assign promo_hit  = ph[3];
  assign promo_miss = pm[3];

endmodule
