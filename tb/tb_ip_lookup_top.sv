// tb_ip_lookup_top: end-to-end test of both lookup engines at full size.
//
// The top is used with its default parameters (five full-size banks per
// engine). A random forwarding table of several hundred routes is built by the
// reference model and downloaded once through the shared table port; then the
// same stream of destination addresses is fed to both engines, one per cycle.
// Every result of both engines is checked against a longest-prefix
// match computed from the route list, with the single-output engine answering after exactly five cycles and
// the multiple-output engine after level+1 cycles on the port of the deciding
// level. Each mechanism of the design is counted and must occur: a download
// write into every bank, a decision at each of the five levels, a lookup with
// no route, a result passed unchanged through later stages, a promoted entry
// that matches and one that does not, and several results in one cycle.
`timescale 1ns/1ps
module tb_ip_lookup_top;
  import rl_pkg::*;
  import rl_tb_pkg::*;

  localparam int NLOOK = 6000;

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

  typedef struct { longint t; bit [31:0] a; bit hit; int nh; int lvl; } exp_t;
  exp_t so_q[$];
  exp_t mo_pend[int];

  // mechanism counters
  int n_wr_level[6], n_so_level[6], n_mo_level[6];
  int n_noroute = 0, n_passthru = 0, n_promo_hit = 0, n_promo_miss = 0;
  int n_multi = 0, n_so_b2b = 0, n_out_so = 0, n_out_mo = 0;
  bit so_prev = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (tbl_wr_en) n_wr_level[tbl_wr_level]++;
    if (so_promo_hit) n_promo_hit++;
    if (so_promo_miss) n_promo_miss++;
    if ($countones(mo_res_valid) > 1) n_multi++;
    if (so_out_valid && so_prev) n_so_b2b++;
    so_prev <= so_out_valid;
    if (so_out_valid) begin
      exp_t e;
      n_out_so++;
      if (so_q.size() == 0) check(0, "single: unexpected result");
      else begin
        e = so_q.pop_front();
        check(cyc - e.t == 6, $sformatf("single latency %0d", cyc - e.t - 1));
        check(so_out_result.addr == e.a, "single order");
        check(so_out_result.hit == e.hit && (!e.hit || so_out_result.nh == 14'(e.nh)),
              $sformatf("single result %h", e.a));
        check(so_out_result.level == 3'(e.lvl), "single level");
        n_so_level[so_out_result.level]++;
        if (!so_out_result.hit) n_noroute++;
        if (so_out_result.level < 5) n_passthru++;
      end
    end
    for (int k = 0; k < LEVELS; k++) if (mo_res_valid[k]) begin
      exp_t e;
      n_out_mo++;
      if (!mo_pend.exists(int'(mo_res[k].tag))) check(0, "multi: unexpected tag");
      else begin
        e = mo_pend[int'(mo_res[k].tag)];
        mo_pend.delete(int'(mo_res[k].tag));
        check(mo_res[k].addr == e.a, "multi addr");
        check(k + 1 == e.lvl, $sformatf("multi port %0d for level %0d", k + 1, e.lvl));
        check(cyc - e.t == longint'(e.lvl + 2), $sformatf("multi latency %0d", cyc - e.t - 1));
        check(mo_res[k].hit == e.hit && (!e.hit || mo_res[k].nh == 14'(e.nh)),
              $sformatf("multi result %h", e.a));
        n_mo_level[k + 1]++;
      end
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fib_model m;
    bit hit, ph, pm;
    int nh, lvl;
    m = new(1'b1);
    m.gen_random(400);
    m.build();
    $display("routes=%0d writes=%0d promoted groups=%0d", m.r_len.size(), m.writes.size(), m.n_promoted);
    check(m.bad_build == 0, "table build");
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
      m.walk(a, hit, nh, lvl, ph, pm);
      if (hit != e.hit || (hit && nh != e.nh)) begin
        failures++;
        $display("model mismatch %h", a);
      end
      @(posedge clk);
      so_in_valid <= 1; so_in_addr <= a; so_in_tag <= 8'(i);
      mo_in_valid <= 1; mo_in_addr <= a; mo_in_tag <= 8'(i);
      e.t = cyc + 1; e.a = a; e.lvl = lvl;
      so_q.push_back(e);
      mo_pend[i % 256] = e;
      if ($urandom_range(30) == 0) begin
        @(posedge clk);
        so_in_valid <= 0;
        mo_in_valid <= 0;
      end
    end
    @(posedge clk);
    so_in_valid <= 0;
    mo_in_valid <= 0;
    repeat (10) @(posedge clk);
    check(n_out_so == NLOOK && so_q.size() == 0, "single: all results");
    check(n_out_mo == NLOOK && mo_pend.size() == 0, "multi: all results");
    for (int l = 1; l <= 5; l++) begin
      check(n_wr_level[l] > 0, $sformatf("download into bank %0d", l));
      check(n_so_level[l] > 0 && n_mo_level[l] > 0, $sformatf("decision at level %0d", l));
    end
    check(n_noroute > 0, "no-route lookups");
    check(n_passthru > 0, "results passed through later stages");
    check(n_promo_hit > 0, "promotion hits");
    check(n_promo_miss > 0, "promoted entries with other offset");
    check(n_multi > 0, "several results in one cycle");
    check(n_so_b2b > 0, "single engine one result per cycle");
    $display("writes per bank: %0d %0d %0d %0d %0d", n_wr_level[1], n_wr_level[2], n_wr_level[3],
             n_wr_level[4], n_wr_level[5]);
    $display("decided at level: %0d %0d %0d %0d %0d, no route %0d, passed through %0d",
             n_so_level[1], n_so_level[2], n_so_level[3], n_so_level[4], n_so_level[5],
             n_noroute, n_passthru);
    $display("promotion hit %0d miss %0d, multi-result cycles %0d, back-to-back single results %0d",
             n_promo_hit, n_promo_miss, n_multi, n_so_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
