// mfdsrr_ctrl - MF-DSRR (multicast flow-based desynchronized static round
// robin) dispatcher of one IM.
//
// Input p uses interstage link (p + offset) mod m. Plain DSRR advances the
// offset every cell time; MF-DSRR advances it by one only when a fan-out
// change is seen on any input of the IM, so the pattern stays put while the
// flows last. When several inputs change in the same cycle the offset still
// moves by one (this design's choice). conn[p] already reflects this
// cycle's change (combinational from change); the offset is stored at the
// clock edge and is 0 after reset.
module mfdsrr_ctrl #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 7,
  localparam int unsigned LW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  change,
  output logic [LW-1:0] conn [N]
);
  logic [LW-1:0] off_q, off_d;

  initial begin
    assert (M >= N) else $error("mfdsrr_ctrl needs m >= n");
  end

  always_comb begin
    off_d = off_q;
    if (|change) off_d = (off_q == LW'(M - 1)) ? '0 : off_q + 1'b1;
    for (int p = 0; p < N; p++) conn[p] = LW'((p + int'(off_d)) % M);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) off_q <= '0;
    else        off_q <= off_d;
  end

endmodule
