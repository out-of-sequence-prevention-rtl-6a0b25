// output_module - m x n input-buffered multicast output module (OM).
//
// Input k is the link from CM k and has its own queue; output q is output
// port OM_IDX*n + q of the switch. A cell is delivered to every output q
// whose fan-out bit OM_IDX*n + q is set, the copies being scheduled by
// mc_xbar. out_ready lets the line card behind an output hold copies back.
module output_module
  import clos_pkg::*;
#(
  parameter int unsigned N      = N_DEF,
  parameter int unsigned M      = M_DEF,
  parameter int unsigned R      = R_DEF,
  parameter int unsigned DW     = DW_DEF,
  parameter int unsigned QDEPTH = QD_DEF,
  parameter int unsigned OM_IDX = 0,
  localparam int unsigned NPORTS = N * R
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [M-1:0]      in_valid,
  output logic [M-1:0]      in_ready,
  input  logic [NPORTS-1:0] in_fanout  [M],
  input  logic [DW-1:0]     in_data    [M],
  output logic [N-1:0]      out_valid,
  input  logic [N-1:0]      out_ready,
  output logic [NPORTS-1:0] out_fanout [N],
  output logic [DW-1:0]     out_data   [N],
  output logic [N-1:0]      grant_mask [M]
);
  logic [N-1:0]         mask [M];
  logic [NPORTS+DW-1:0] cell_in  [M];
  logic [NPORTS+DW-1:0] cell_out [N];

  initial begin
    assert (OM_IDX < R) else $error("OM_IDX out of range");
  end

  always_comb begin
    for (int k = 0; k < M; k++) begin
      mask[k]    = in_fanout[k][OM_IDX*N +: N];
      cell_in[k] = {in_fanout[k], in_data[k]};
    end
    for (int q = 0; q < N; q++) {out_fanout[q], out_data[q]} = cell_out[q];
  end

  mc_xbar #(.NI(M), .NO(N), .W(NPORTS + DW), .QDEPTH(QDEPTH)) u_xbar (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_mask(mask), .in_data(cell_in),
    .out_valid, .out_ready, .out_data(cell_out), .grant_mask
  );

endmodule
