// tb_promotion_unit: checks the level-3 promotion test.
//
// Random level-3 entries and address bits: promoted only when both flag bits
// are set, match only when promoted and the offset equals address bits 12..8,
// and the next hop is the 11-bit promoted field widened to 14 bits. Each
// offset value is also hit exactly once on purpose.
`timescale 1ns/1ps
module tb_promotion_unit;
  import rl_pkg::*;

  l3_entry_t              entry;
  logic [PROMO_OFF_W-1:0] addr_bits;
  logic                   promoted, match;
  logic [NH_W-1:0]        nh;

  promotion_unit dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [31:0] raw;
    bit        ep, em;
    for (int n = 0; n < 2000; n++) begin
      raw = $urandom();
      if (n < 32) begin
        raw[31:30] = 2'b11;
        raw[4:0]   = 5'(n);
        addr_bits  = 5'(n);
      end else begin
        addr_bits = ($urandom_range(1)) ? raw[4:0] : 5'($urandom());
      end
      entry = l3_entry_t'(raw);
      #1;
      ep = raw[31] & raw[30];
      em = ep && (raw[4:0] == addr_bits);
      check(promoted == ep, "promoted");
      check(match == em, $sformatf("match raw=%h bits=%0d", raw, addr_bits));
      if (em) check(nh == {3'b000, raw[15:5]}, "next hop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
