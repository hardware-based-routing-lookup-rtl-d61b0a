// tb_level_mem: checks one memory bank (reduced to 64 x 16 bits).
//
// Fills every entry through the write port, reads them back in random order
// and checks the one-cycle read latency, that rd_data holds while rd_en is
// low, and that a read and a write of the same entry in one cycle return the
// old entry.
`timescale 1ns/1ps
module tb_level_mem;
  localparam int AW = 6;
  localparam int DW = 16;

  logic          clk = 0;
  logic          rd_en = 0;
  logic [AW-1:0] rd_addr = '0;
  logic [DW-1:0] rd_data;
  logic          wr_en = 0;
  logic [AW-1:0] wr_addr = '0;
  logic [DW-1:0] wr_data = '0;

  level_mem #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [2**AW];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] held;
    for (int i = 0; i < 2**AW; i++) begin
      ref_mem[i] = DW'($urandom());
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i); wr_data = ref_mem[i];
    end
    @(negedge clk);
    wr_en = 0;
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(2**AW - 1);
      rd_en = 1; rd_addr = AW'(a);
      @(negedge clk);
      check(rd_data == ref_mem[a], $sformatf("read %0d", a));
      if ($urandom_range(3) == 0) begin
        held  = rd_data;
        rd_en = 0; rd_addr = AW'(a + 1);
        @(negedge clk);
        check(rd_data == held, "hold while rd_en low");
      end
    end
    // read-during-write: old value out, new value stored
    rd_en = 1; rd_addr = 6'd9; wr_en = 1; wr_addr = 6'd9; wr_data = ~ref_mem[9];
    @(negedge clk);
    check(rd_data == ref_mem[9], "read during write returns old entry");
    wr_en = 0;
    @(negedge clk);
    check(rd_data == ~ref_mem[9], "written entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
