// tb_single_output_engine: end-to-end check of the single-output engine.
//
// Builds a random forwarding table with the reference model, downloads it
// through the table port, then streams lookups back to back (with a few idle
// cycles) and checks every result against a longest-prefix match computed from the route list:
// tag, hit, next hop, the level that decided it, and that it leaves exactly
// five cycles after it entered (one lookup per cycle, five memory accesses).
`timescale 1ns/1ps
module tb_single_output_engine;
  import rl_pkg::*;
  import rl_tb_pkg::*;

  localparam int NLOOK   = 3000;
  localparam int LATENCY = 5;

  logic                  clk = 0;
  logic                  rst_n = 0;
  logic                  in_valid = 0;
  logic [ADDR_W-1:0]     in_addr = '0;
  logic [TAG_W-1:0]      in_tag = '0;
  logic                  tbl_wr_en = 0;
  logic [2:0]            tbl_wr_level = '0;
  logic [MEM_AW_MAX-1:0] tbl_wr_addr = '0;
  logic [MEM_DW_MAX-1:0] tbl_wr_data = '0;
  logic                  out_valid;
  result_t               out_result;
  logic                  promo_hit, promo_miss;

  single_output_engine dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { longint t; bit [31:0] a; bit [7:0] tag; bit hit; int nh; int lvl; } exp_t;
  exp_t q[$];
  int n_out = 0, n_promo_hit = 0, n_promo_miss = 0, n_lvl[6];
  int n_promo_seen = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (promo_hit) n_promo_seen++;
    if (out_valid) begin
      exp_t e;
      n_out++;
      if (q.size() == 0) check(0, "unexpected result");
      else begin
        e = q.pop_front();
        // e.t is the edge that samples the request; the checker sees a
        // registered output one edge after the edge that produced it.
        check(cyc - e.t == longint'(LATENCY + 1), $sformatf("latency %0d", cyc - e.t - 1));
        check(out_result.tag == e.tag && out_result.addr == e.a, "tag/addr order");
        check(out_result.hit == e.hit, $sformatf("hit %h exp %0d got %0d", e.a, e.hit, out_result.hit));
        check(!e.hit || out_result.nh == 14'(e.nh),
              $sformatf("nh %h exp %0d got %0d", e.a, e.nh, out_result.nh));
        check(out_result.level == 3'(e.lvl), $sformatf("level %h exp %0d got %0d", e.a, e.lvl, out_result.level));
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
    int nh, lvl, rnh;
    bit rhit;
    m = new(1'b1);
    m.gen_random(200);
    m.build();
    $display("routes=%0d writes=%0d promoted=%0d segs=%0d/%0d/%0d/%0d bad=%0d",
             m.r_len.size(), m.writes.size(), m.n_promoted,
             m.next_seg[2], m.next_seg[3], m.next_seg[4], m.next_seg[5], m.bad_build);
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
      m.lpm(a, rhit, rnh);
      m.walk(a, hit, nh, lvl, ph, pm);
      if (hit != rhit || (hit && nh != rnh)) begin
        failures++;
        $display("model mismatch %h", a);
      end
      if (ph) n_promo_hit++;
      if (pm) n_promo_miss++;
      n_lvl[lvl]++;
      @(posedge clk);
      in_valid <= 1;
      in_addr  <= a;
      in_tag   <= 8'(i);
      e.t = cyc + 1; e.a = a; e.tag = 8'(i); e.hit = rhit; e.nh = rnh; e.lvl = lvl;
      q.push_back(e);
      if (($urandom_range(20)) == 0) begin
        @(posedge clk);
        in_valid <= 0;
      end
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (LATENCY + 3) @(posedge clk);
    check(n_out == NLOOK && q.size() == 0, $sformatf("result count %0d", n_out));
    check(n_promo_seen == n_promo_hit, "promotion pulses");
    $display("levels: 1:%0d 2:%0d 3:%0d 4:%0d 5:%0d promo hit %0d miss %0d",
             n_lvl[1], n_lvl[2], n_lvl[3], n_lvl[4], n_lvl[5], n_promo_hit, n_promo_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
