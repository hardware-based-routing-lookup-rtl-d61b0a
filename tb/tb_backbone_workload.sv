// tb_backbone_workload: a forwarding table of backbone size in both engines.
//
// Builds a table with 56,442 routes, the route count of the MAE-East backbone
// table of 10 March 2000, with a backbone-like spread of prefix lengths
// (mostly /24, then /20../23, /16 and /19, about 1% longer than /24). The
// prefixes themselves are random: no real table is used. The test checks that
// the table fits the layout (no level needs more than 16,384 groups, every
// next hop fits its field), downloads it into the full-size top, and runs
// 20,000 lookups through both engines, one per cycle, checking each result
// against a longest-prefix match from the route list and the latency of each
// engine. It prints the groups per level and the bytes of the banks in use.
`timescale 1ns/1ps
module tb_backbone_workload;
  import rl_pkg::*;
  import rl_tb_pkg::*;

  localparam int NROUTES = 56442;
  localparam int NBLOCKS = 1800;
  localparam int NLOOK   = 20000;

  logic                  clk = 0;
  logic                  rst_n = 0;
  logic                  tbl_wr_en = 0;
  logic [2:0]            tbl_wr_level = '0;
  logic [MEM_AW_MAX-1:0] tbl_wr_addr = '0;
  logic [MEM_DW_MAX-1:0] tbl_wr_data = '0;
  logic                  so_in_valid = 0;
  logic [ADDR_W-1:0]     so_in_addr = '0;
  logic [TAG_W-1:0]      so_in_tag = '0;
  logic                  so_out_valid;
  result_t               so_out_result;
  logic                  so_promo_hit, so_promo_miss;
  logic                  mo_in_valid = 0;
  logic                  mo_in_ready;
  logic [ADDR_W-1:0]     mo_in_addr = '0;
  logic [TAG_W-1:0]      mo_in_tag = '0;
  logic [LEVELS-1:0]     mo_res_valid;
  result_t               mo_res [LEVELS];
  logic                  mo_promo_hit, mo_promo_miss;
  logic [4:0]            mo_buf_level;

  ip_lookup_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { longint t; bit [31:0] a; bit hit; int nh; } exp_t;
  exp_t so_q[$];
  exp_t mo_pend[int];
  int n_so = 0, n_mo = 0, n_lvl[6], n_promo = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (so_promo_hit) n_promo++;
    if (so_out_valid) begin
      exp_t e;
      n_so++;
      if (so_q.size() == 0) check(0, "single: unexpected result");
      else begin
        e = so_q.pop_front();
        check(cyc - e.t == 6, "single latency");
        check(so_out_result.addr == e.a && so_out_result.hit == e.hit &&
              (!e.hit || so_out_result.nh == 14'(e.nh)), $sformatf("single result %h", e.a));
        n_lvl[so_out_result.level]++;
      end
    end
    for (int k = 0; k < LEVELS; k++) if (mo_res_valid[k]) begin
      exp_t e;
      n_mo++;
      if (!mo_pend.exists(int'(mo_res[k].tag))) check(0, "multi: unexpected tag");
      else begin
        e = mo_pend[int'(mo_res[k].tag)];
        mo_pend.delete(int'(mo_res[k].tag));
        check(cyc - e.t == longint'(k + 3), "multi latency");
        check(mo_res[k].addr == e.a && mo_res[k].hit == e.hit &&
              (!e.hit || mo_res[k].nh == 14'(e.nh)), $sformatf("multi result %h", e.a));
      end
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fib_model m;
    m = new(1'b1);
    m.gen_backbone(NROUTES, NBLOCKS);
    m.build();
    $display("routes %0d, groups per level 2..5: %0d %0d %0d %0d (limit %0d), promoted %0d",
             m.r_len.size(), m.next_seg[2], m.next_seg[3], m.next_seg[4], m.next_seg[5],
             1 << PTR_W, m.n_promoted);
    $display("download writes %0d, bank bytes in use %0d of %0d",
             m.writes.size(), m.used_bytes(), 64'(512) + (64'(1) << 23) + (64'(1) << 19) +
             (64'(1) << 20) + (64'(1) << 22));
    check(m.r_len.size() == NROUTES, "route count");
    check(m.bad_build == 0, "table fits the layout");
    for (int l = 2; l <= 5; l++) check(m.next_seg[l] <= (1 << PTR_W), $sformatf("groups at level %0d", l));
    repeat (3) @(posedge clk);
    rst_n <= 1;
    foreach (m.writes[i]) begin
      @(posedge clk);
      tbl_wr_en    <= 1;
      tbl_wr_level <= m.writes[i].level;
      tbl_wr_addr  <= m.writes[i].addr;
      tbl_wr_data  <= m.writes[i].data;
    end
    @(posedge clk);
    tbl_wr_en <= 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < NLOOK; i++) begin
      exp_t e;
      bit [31:0] a;
      a = m.pick_addr();
      m.lpm(a, e.hit, e.nh);
      @(posedge clk);
      so_in_valid <= 1; so_in_addr <= a; so_in_tag <= 8'(i);
      mo_in_valid <= 1; mo_in_addr <= a; mo_in_tag <= 8'(i);
      e.t = cyc + 1; e.a = a;
      so_q.push_back(e);
      mo_pend[i % 256] = e;
    end
    @(posedge clk);
    so_in_valid <= 0;
    mo_in_valid <= 0;
    repeat (10) @(posedge clk);
    check(n_so == NLOOK && n_mo == NLOOK, "all results");
    $display("decided at level 1..5: %0d %0d %0d %0d %0d, promotion hits %0d",
             n_lvl[1], n_lvl[2], n_lvl[3], n_lvl[4], n_lvl[5], n_promo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
