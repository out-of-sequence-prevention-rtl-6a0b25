// cell_fifo - synchronous first-in-first-out cell queue.
//
// Used for every queue of the switch: the queue in front of each IM input,
// the r input queues of each central module and the m input queues of each
// output module. Cells are written with a valid/ready handshake and read
// the same way; a cell written in one cycle is visible at the head in the
// next (no fall-through). in_ready is low while the queue is full;
// out_valid is high while it holds a cell. Depth and width are parameters;
// the depth default is this design's choice.
module cell_fifo #(
  parameter int unsigned W     = 48,
  parameter int unsigned DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [AW:0]   cnt_q;
  logic          push, pop;

  assign in_ready  = (cnt_q != (AW+1)'(DEPTH));
  assign out_valid = (cnt_q != '0);
  assign out_data  = mem[rd_q];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= incr(wr_q);
      if (pop)  rd_q <= incr(rd_q);
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

endmodule
