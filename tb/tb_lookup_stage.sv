// tb_lookup_stage: checks the per-level decision logic.
//
// Three instances (level 2, level 3 with promotion, level 5) get the same
// random pipeline slot and random entries. For each the expected outcome is
// worked out here from the entry format: a finished lookup passes unchanged;
// valid ends with a hit on the entry pointer; index reads the next level at
// {pointer, next address field}; neither flag ends with no route; at level 3
// both flags make a promoted entry whose offset is compared with address bits
// 12..8; at level 5 the 7-bit next hop is taken when valid.
`timescale 1ns/1ps
module tb_lookup_stage;
  import rl_pkg::*;

  slot_t                 s_in;
  logic [MEM_DW_MAX-1:0] q2, q3, q5;
  slot_t                 o2, o3, o5;
  logic                  re2, re3, re5;
  logic [MEM_AW_MAX-1:0] ra2, ra3, ra5;
  logic                  rs2, rs3, rs5, ph2, ph3, ph5, pm2, pm3, pm5;

  lookup_stage #(.LEVEL(2), .PROMOTION(1'b1)) u2 (
    .s_in(s_in), .q(q2), .s_out(o2), .rd_en(re2), .rd_addr(ra2),
    .resolved(rs2), .promo_hit(ph2), .promo_miss(pm2));
  lookup_stage #(.LEVEL(3), .PROMOTION(1'b1)) u3 (
    .s_in(s_in), .q(q3), .s_out(o3), .rd_en(re3), .rd_addr(ra3),
    .resolved(rs3), .promo_hit(ph3), .promo_miss(pm3));
  lookup_stage #(.LEVEL(5), .PROMOTION(1'b1)) u5 (
    .s_in(s_in), .q(q5), .s_out(o5), .rd_en(re5), .rd_addr(ra5),
    .resolved(rs5), .promo_hit(ph5), .promo_miss(pm5));

  int checks = 0, failures = 0;
  int n_kind[8];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // expected: kind 0 pass, 1 hit, 2 index, 3 no route, 4 promo hit, 5 promo miss
  task automatic expect_out(int lvl, bit [31:0] raw, slot_t o, logic re, logic [21:0] ra,
                            logic rs, logic ph, logic pm);
    bit v, ix;
    int kind;
    bit [13:0] ptr;
    bit [21:0] eaddr;
    bit [13:0] enh;
    if (lvl == 3) begin v = raw[31]; ix = raw[30]; ptr = raw[29:16]; end
    else begin v = raw[15]; ix = raw[14]; ptr = raw[13:0]; end
    if (!s_in.busy || s_in.done) kind = 0;
    else if (lvl == 5) kind = raw[7] ? 1 : 3;
    else if (lvl == 3 && v && ix) kind = (raw[4:0] == s_in.addr[12:8]) ? 4 : 5;
    else if (v) kind = 1;
    else if (ix) kind = 2;
    else kind = 3;
    n_kind[kind]++;
    case (lvl)
      2:       eaddr = 22'({ptr, s_in.addr[15:13]});
      3:       eaddr = 22'({ptr, s_in.addr[12:8]});
      default: eaddr = '0;
    endcase
    enh = (lvl == 5) ? 14'(raw[6:0]) : (kind == 4) ? 14'(raw[15:5]) : ptr;
    check(re == (kind == 2 || kind == 5), $sformatf("L%0d rd_en kind %0d", lvl, kind));
    if (kind == 2 || kind == 5) check(ra == eaddr, $sformatf("L%0d rd_addr", lvl));
    check(rs == (kind == 1 || kind == 3 || kind == 4), $sformatf("L%0d resolved", lvl));
    check(ph == (kind == 4) && pm == (kind == 5), $sformatf("L%0d promo flags", lvl));
    check(o.busy == s_in.busy && o.tag == s_in.tag && o.addr == s_in.addr, "slot fields kept");
    case (kind)
      0, 2, 5: check(o == s_in, $sformatf("L%0d slot unchanged kind %0d", lvl, kind));
      1, 4:    check(o.done && o.hit && o.nh == enh && o.level == 3'(lvl), $sformatf("L%0d hit", lvl));
      default: check(o.done && !o.hit && o.level == 3'(lvl), $sformatf("L%0d no route", lvl));
    endcase
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [31:0] r2, r3, r5;
    for (int n = 0; n < 4000; n++) begin
      s_in       = slot_t'({$urandom(), $urandom(), $urandom()});
      s_in.busy  = ($urandom_range(9) != 0);
      s_in.done  = ($urandom_range(4) == 0);
      r2 = $urandom(); r3 = $urandom(); r5 = $urandom();
      r2[31:16] = '0; r5[31:8] = '0;
      // make promoted offsets match half of the time
      if ($urandom_range(1)) r3[4:0] = s_in.addr[12:8];
      if (r3[31:30] != 2'b11) r3[15:0] = '0;
      q2 = r2; q3 = r3; q5 = r5;
      #1;
      expect_out(2, r2, o2, re2, ra2, rs2, ph2, pm2);
      expect_out(3, r3, o3, re3, ra3, rs3, ph3, pm3);
      expect_out(5, r5, o5, re5, ra5, rs5, ph5, pm5);
    end
    for (int k = 0; k < 6; k++) check(n_kind[k] > 0, $sformatf("case %0d exercised", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
