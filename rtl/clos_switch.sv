// clos_switch - input-queuing space-memory-memory (IQ-SMM) Clos switch
// C(n, m, r) for multicast cells.
//
// Port g = i*n + p is input p of input module IM i and, on the output
// side, output p of output module OM i. Every input has a cell queue in
// front of its IM. The r IMs are bufferless space switches whose
// dispatcher (MFRR or MF-DSRR, chosen by `scheme`) decides which of the m
// interstage links each input uses. Link k of IM i enters input queue i of
// central module CM k; CM output j is the link to OM j, where it enters
// input queue k. CMs copy a cell once per destination OM, OMs once per
// destination port, so no stage needs speed-up: every link carries at most
// one cell per cycle. A cell is an N-bit fan-out vector plus a DW-bit
// payload. Flow control is valid/ready everywhere; a full queue stalls the
// stage before it, back to in_ready. Minimum latency from in_valid to
// out_valid is three cycles (one per queue).
module clos_switch
  import clos_pkg::*;
#(
  parameter int unsigned N      = N_DEF,
  parameter int unsigned M      = M_DEF,
  parameter int unsigned R      = R_DEF,
  parameter int unsigned DW     = DW_DEF,
  parameter int unsigned QDEPTH = QD_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  scheme_e          scheme,
  input  logic [N*R-1:0]   in_valid,
  output logic [N*R-1:0]   in_ready,
  input  logic [N*R-1:0]   in_fanout  [N*R],
  input  logic [DW-1:0]    in_data    [N*R],
  output logic [N*R-1:0]   out_valid,
  input  logic [N*R-1:0]   out_ready,
  output logic [N*R-1:0]   out_fanout [N*R],
  output logic [DW-1:0]    out_data   [N*R]
);
  localparam int unsigned NP = N * R;
  localparam int unsigned LW = (M > 1) ? $clog2(M) : 1;

  // input queues -> IMs
  logic [NP-1:0] hol_valid, hol_ready;
  logic [NP-1:0] hol_fanout [NP];
  logic [DW-1:0] hol_data   [NP];

  for (genvar g = 0; g < NP; g++) begin : g_inq
    cell_fifo #(.W(NP + DW), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n,
      .in_valid (in_valid[g]),
      .in_ready (in_ready[g]),
      .in_data  ({in_fanout[g], in_data[g]}),
      .out_valid(hol_valid[g]),
      .out_ready(hol_ready[g]),
      .out_data ({hol_fanout[g], hol_data[g]})
    );
  end

  // IM i link k  <->  CM k input i
  logic [M-1:0]  il_valid  [R];
  logic [M-1:0]  il_ready  [R];
  logic [NP-1:0] il_fanout [R][M];
  logic [DW-1:0] il_data   [R][M];
  // CM k output j  <->  OM j input k
  logic [R-1:0]  cl_valid  [M];
  logic [R-1:0]  cl_ready  [M];
  logic [NP-1:0] cl_fanout [M][R];
  logic [DW-1:0] cl_data   [M][R];

  for (genvar i = 0; i < R; i++) begin : g_im
    logic [N-1:0]  change;
    logic [LW-1:0] conn [N];
    logic [NP-1:0] f [N];
    logic [DW-1:0] d [N];
    for (genvar p = 0; p < N; p++) begin : g_p
      assign f[p] = hol_fanout[i*N + p];
      assign d[p] = hol_data[i*N + p];
    end
    input_module #(.N(N), .M(M), .NPORTS(NP), .DW(DW)) u_im (
      .clk, .rst_n, .scheme,
      .hol_valid (hol_valid[i*N +: N]),
      .hol_ready (hol_ready[i*N +: N]),
      .hol_fanout(f),
      .hol_data  (d),
      .il_valid  (il_valid[i]),
      .il_ready  (il_ready[i]),
      .il_fanout (il_fanout[i]),
      .il_data   (il_data[i]),
      .change,
      .conn
    );
  end

  for (genvar k = 0; k < M; k++) begin : g_cm
    logic [R-1:0]  v, rdy;
    logic [NP-1:0] f [R];
    logic [DW-1:0] d [R];
    logic [R-1:0]  grant_mask [R];
    for (genvar i = 0; i < R; i++) begin : g_i
      assign v[i]           = il_valid[i][k];
      assign il_ready[i][k] = rdy[i];
      assign f[i]           = il_fanout[i][k];
      assign d[i]           = il_data[i][k];
    end
    central_module #(.N(N), .R(R), .DW(DW), .QDEPTH(QDEPTH)) u_cm (
      .clk, .rst_n,
      .in_valid  (v),
      .in_ready  (rdy),
      .in_fanout (f),
      .in_data   (d),
      .out_valid (cl_valid[k]),
      .out_ready (cl_ready[k]),
      .out_fanout(cl_fanout[k]),
      .out_data  (cl_data[k]),
      .grant_mask
    );
  end

  for (genvar j = 0; j < R; j++) begin : g_om
    logic [M-1:0]  v, rdy;
    logic [NP-1:0] f [M];
    logic [DW-1:0] d [M];
    logic [NP-1:0] of [N];
    logic [DW-1:0] od [N];
    logic [N-1:0]  grant_mask [M];
    for (genvar k = 0; k < M; k++) begin : g_k
      assign v[k]           = cl_valid[k][j];
      assign cl_ready[k][j] = rdy[k];
      assign f[k]           = cl_fanout[k][j];
      assign d[k]           = cl_data[k][j];
    end
    output_module #(.N(N), .M(M), .R(R), .DW(DW), .QDEPTH(QDEPTH), .OM_IDX(j)) u_om (
      .clk, .rst_n,
      .in_valid  (v),
      .in_ready  (rdy),
      .in_fanout (f),
      .in_data   (d),
      .out_valid (out_valid[j*N +: N]),
      .out_ready (out_ready[j*N +: N]),
      .out_fanout(of),
      .out_data  (od),
      .grant_mask
    );
    for (genvar q = 0; q < N; q++) begin : g_q
      assign out_fanout[j*N + q] = of[q];
      assign out_data[j*N + q]   = od[q];
    end
  end

endmodule
