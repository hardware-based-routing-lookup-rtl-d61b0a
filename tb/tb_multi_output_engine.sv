// tb_multi_output_engine: end-to-end check of the multiple-output engine.
//
// Builds a random forwarding table with the reference model, downloads it,
// then pushes lookups into the IP address buffer back to back (with a few idle
// cycles). Every result must come out of the port of the level that decides it
// (from a walk of the reference tables), carry the longest-prefix
// match computed from the route list, and leave level+1 cycles after it was accepted: one cycle in the
// buffer and one cycle per level visited. The test also requires that results
// of different lookups leave in the same cycle at least once.
`timescale 1ns/1ps
module tb_multi_output_engine;
  import rl_pkg::*;
  import rl_tb_pkg::*;

  localparam int NLOOK = 3000;

  logic                  clk = 0;
  logic                  rst_n = 0;
  logic                  in_valid = 0;
  logic                  in_ready;
  logic [ADDR_W-1:0]     in_addr = '0;
  logic [TAG_W-1:0]      in_tag = '0;
  logic                  tbl_wr_en = 0;
  logic [2:0]            tbl_wr_level = '0;
  logic [MEM_AW_MAX-1:0] tbl_wr_addr = '0;
  logic [MEM_DW_MAX-1:0] tbl_wr_data = '0;
  logic [LEVELS-1:0]     res_valid;
  result_t               res [LEVELS];
  logic                  promo_hit, promo_miss;
  logic [4:0]            buf_level;

  multi_output_engine dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { longint t; bit [31:0] a; bit hit; int nh; int lvl; } exp_t;
  exp_t pend[int];
  int n_out = 0, n_multi = 0, n_promo_seen = 0, n_promo_hit = 0, n_lvl[6], n_notready = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (promo_hit) n_promo_seen++;
    if (!in_ready) n_notready++;
    if ($countones(res_valid) > 1) n_multi++;
    for (int k = 0; k < LEVELS; k++) if (res_valid[k]) begin
      exp_t e;
      n_out++;
      if (!pend.exists(int'(res[k].tag))) check(0, $sformatf("unexpected tag %0d", res[k].tag));
      else begin
        e = pend[int'(res[k].tag)];
        pend.delete(int'(res[k].tag));
        check(res[k].addr == e.a, "addr");
        check(k + 1 == e.lvl && res[k].level == 3'(k + 1),
              $sformatf("port %0d for %h, expected level %0d", k + 1, e.a, e.lvl));
        // accepted at e.t, one cycle in the buffer, one per level, and the
        // checker sees a registered output one edge later
        check(cyc - e.t == longint'(e.lvl + 2), $sformatf("latency %0d", cyc - e.t - 1));
        check(res[k].hit == e.hit, $sformatf("hit %h", e.a));
        check(!e.hit || res[k].nh == 14'(e.nh), $sformatf("nh %h exp %0d got %0d", e.a, e.nh, res[k].nh));
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
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
    m.gen_random(200);
    m.build();
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
      if (ph) n_promo_hit++;
      n_lvl[lvl]++;
      @(posedge clk);
      in_valid <= 1;
      in_addr  <= a;
      in_tag   <= 8'(i);
      e.t = cyc + 1; e.a = a; e.lvl = lvl;
      pend[i % 256] = e;
      if ($urandom_range(20) == 0) begin
        @(posedge clk);
        in_valid <= 0;
      end
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (10) @(posedge clk);
    check(n_out == NLOOK && pend.size() == 0, $sformatf("result count %0d", n_out));
    check(n_multi > 0, "several results in one cycle");
    check(n_notready == 0, "buffer never full at one lookup per cycle");
    check(n_promo_seen == n_promo_hit, "promotion pulses");
    $display("levels: 1:%0d 2:%0d 3:%0d 4:%0d 5:%0d promo hit %0d, multi-output cycles %0d",
             n_lvl[1], n_lvl[2], n_lvl[3], n_lvl[4], n_lvl[5], n_promo_hit, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
