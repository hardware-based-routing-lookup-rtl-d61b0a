// tb_ip_addr_buffer: checks the IP address buffer (reduced to 4 entries).
//
// Random pushes and pops against a queue model: order of the words, in_ready
// low exactly when full, out_valid high exactly when not empty, the occupancy
// output, and the one-cycle latency from push to the output of an empty
// buffer.
`timescale 1ns/1ps
module tb_ip_addr_buffer;
  localparam int DEPTH = 4;
  localparam int W     = 40;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         in_valid = 0;
  logic         in_ready;
  logic [W-1:0] in_data = '0;
  logic         out_valid;
  logic         out_ready = 0;
  logic [W-1:0] out_data;
  logic [2:0]   level_o;

  ip_addr_buffer #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_full = 0;
  logic [W-1:0] model[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit push, pop;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid && in_ready && level_o == 0, "empty after reset");
    // one-cycle latency into an empty buffer
    in_valid = 1; in_data = 40'h12_3456_789a;
    @(negedge clk);
    in_valid = 0;
    check(out_valid && out_data == 40'h12_3456_789a, "push visible after one cycle");
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
    for (int n = 0; n < 2000; n++) begin
      in_valid  = ($urandom_range(99) < 55);
      in_data   = {$urandom(), 8'($urandom())};
      out_ready = ($urandom_range(99) < 45);
      #1;
      check(in_ready == (model.size() < DEPTH), "in_ready");
      check(out_valid == (model.size() > 0), "out_valid");
      check(level_o == 3'(model.size()), "level");
      if (out_valid) check(out_data == model[0], "order");
      if (!in_ready) n_full++;
      push = in_valid && in_ready;
      pop  = out_valid && out_ready;
      @(negedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(in_data);
    end
    check(n_full > 0, "buffer reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
