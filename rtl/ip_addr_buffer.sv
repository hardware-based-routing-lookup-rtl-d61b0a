// ip_addr_buffer: the IP address buffer in front of the multiple-output
// lookup engine.
//
// Destination addresses (with the caller's tag) are written in at the input
// and leave in arrival order to the first pipeline register. It is a
// synchronous FIFO of DEPTH entries with valid/ready on both sides: in_ready
// is low when full, out_valid is high when not empty, and an entry is moved
// when valid and ready are both high at a clock edge. A word written into an
// empty buffer can be taken out in the next cycle (one cycle of latency).
// The published design names this buffer but gives neither its depth nor its
// handshake; both are this design's choices. DEPTH must be a power of two.
module ip_addr_buffer #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH):0] level_o  // entries held
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [W-1:0]  buf_q [DEPTH];
  logic [PW:0]   wr_ptr, rd_ptr;
  logic          push, pop;

  assign level_o   = wr_ptr - rd_ptr;
  assign in_ready  = (level_o != (PW+1)'(DEPTH));
  assign out_valid = (level_o != '0);
  assign out_data  = buf_q[rd_ptr[PW-1:0]];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // Handshake rules: never more than DEPTH entries, and a word that is
  // offered but not taken stays at the output unchanged.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    level_o <= (PW+1)'(DEPTH));
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));

  always_ff @(posedge clk) begin
    if (push) buf_q[wr_ptr[PW-1:0]] <= in_data;
  end

endmodule
