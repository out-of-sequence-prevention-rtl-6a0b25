// fanout_change_detect - flow-change monitor of one IM input.
//
// A multicast flow is a run of cells with the same fan-out vector. The
// monitor remembers the fan-out vector of the last head-of-line cell it saw
// and raises `change` for one cycle when a head-of-line cell with a
// different vector appears, which is the event both flow-based dispatching
// schemes react to. The flag is raised in the first cycle the new vector is
// at the head, whether or not the cell leaves in that cycle, and not again
// for the following cells of the same flow. The first cell after reset has
// no previous flow and raises no change (own choice). Purely combinational
// output from registered state plus the head-of-line inputs.
module fanout_change_detect #(
  parameter int unsigned NPORTS = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hol_valid,
  input  logic [NPORTS-1:0] hol_fanout,
  output logic              change
);
  logic              seen_q;
  logic [NPORTS-1:0] last_q;

  assign change = hol_valid && seen_q && (hol_fanout != last_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_q <= 1'b0;
      last_q <= '0;
    end else if (hol_valid) begin
      seen_q <= 1'b1;
      last_q <= hol_fanout;
    end
  end

endmodule
