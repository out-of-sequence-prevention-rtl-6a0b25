// central_module - r x r input-buffered multicast central module (CM).
//
// Input i is the interstage link from IM i and has its own queue; output d
// is the link to OM d. The fan-out vector of a cell is read as r
// bit-clusters of n bits, cluster d covering output ports n*d .. n*d+n-1
// (all the ports of OM d). The CM sends one copy of the cell to OM d for
// every non-zero cluster d, so OM d receives a single copy however many of
// its ports want the cell. Queueing and scheduling are those of mc_xbar.
// A copy is sent only when the OM queue behind the link can accept it
// (out_ready). Cells keep their full fan-out vector on the way out.
module central_module
  import clos_pkg::*;
#(
  parameter int unsigned N      = N_DEF,
  parameter int unsigned R      = R_DEF,
  parameter int unsigned DW     = DW_DEF,
  parameter int unsigned QDEPTH = QD_DEF,
  localparam int unsigned NPORTS = N * R
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [R-1:0]      in_valid,
  output logic [R-1:0]      in_ready,
  input  logic [NPORTS-1:0] in_fanout  [R],
  input  logic [DW-1:0]     in_data    [R],
  output logic [R-1:0]      out_valid,
  input  logic [R-1:0]      out_ready,
  output logic [NPORTS-1:0] out_fanout [R],
  output logic [DW-1:0]     out_data   [R],
  output logic [R-1:0]      grant_mask [R]
);
  logic [R-1:0]           mask [R];
  logic [NPORTS+DW-1:0]   cell_in  [R];
  logic [NPORTS+DW-1:0]   cell_out [R];

  always_comb begin
    for (int i = 0; i < R; i++) begin
      for (int d = 0; d < R; d++) mask[i][d] = |in_fanout[i][d*N +: N];
      cell_in[i] = {in_fanout[i], in_data[i]};
    end
    for (int d = 0; d < R; d++) {out_fanout[d], out_data[d]} = cell_out[d];
  end

  mc_xbar #(.NI(R), .NO(R), .W(NPORTS + DW), .QDEPTH(QDEPTH)) u_xbar (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_mask(mask), .in_data(cell_in),
    .out_valid, .out_ready, .out_data(cell_out), .grant_mask
  );

endmodule
