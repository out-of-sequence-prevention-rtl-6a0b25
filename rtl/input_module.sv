// input_module - bufferless n x m input module (IM) of the IQ-SMM switch.
//
// Each of the n inputs is fed by the head of its input queue. A
// fanout_change_detect per input spots the start of a new multicast flow;
// the dispatcher selected by `scheme` (MFRR or MF-DSRR, both always present)
// turns those events into the connection pattern conn[p], the interstage
// link each input uses in this cycle. The space stage then forwards the head
// cell of input p over link conn[p]. The pattern is one-to-one, so a link
// carries at most one cell per cycle. An input's head cell leaves
// (hol_ready) when the central-module queue behind its link can take it;
// otherwise it waits at the head and the link stays idle. `scheme` is a
// static configuration input (own choice); the dispatcher that is not
// selected sees no changes and keeps its state. change is brought out for
// monitoring. Everything between the head-of-line inputs and the link
// outputs is combinational.
module input_module
  import clos_pkg::*;
#(
  parameter int unsigned N      = N_DEF,
  parameter int unsigned M      = M_DEF,
  parameter int unsigned NPORTS = N_DEF * R_DEF,
  parameter int unsigned DW     = DW_DEF,
  localparam int unsigned LW = (M > 1) ? $clog2(M) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  scheme_e           scheme,
  // head of the n input queues
  input  logic [N-1:0]      hol_valid,
  output logic [N-1:0]      hol_ready,
  input  logic [NPORTS-1:0] hol_fanout [N],
  input  logic [DW-1:0]     hol_data   [N],
  // m interstage links to the central modules
  output logic [M-1:0]      il_valid,
  input  logic [M-1:0]      il_ready,
  output logic [NPORTS-1:0] il_fanout  [M],
  output logic [DW-1:0]     il_data    [M],
  // monitoring
  output logic [N-1:0]      change,
  output logic [LW-1:0]     conn       [N]
);
  logic [LW-1:0] conn_rr [N];
  logic [LW-1:0] conn_ds [N];
  logic [N-1:0]  chg_rr, chg_ds;

  for (genvar p = 0; p < N; p++) begin : g_det
    fanout_change_detect #(.NPORTS(NPORTS)) u_det (
      .clk, .rst_n,
      .hol_valid (hol_valid[p]),
      .hol_fanout(hol_fanout[p]),
      .change    (change[p])
    );
  end

  assign chg_rr = (scheme == SCHEME_MFRR)   ? change : '0;
  assign chg_ds = (scheme == SCHEME_MFDSRR) ? change : '0;

  mfrr_ctrl   #(.N(N), .M(M)) u_mfrr   (.clk, .rst_n, .change(chg_rr), .conn(conn_rr));
  mfdsrr_ctrl #(.N(N), .M(M)) u_mfdsrr (.clk, .rst_n, .change(chg_ds), .conn(conn_ds));

  always_comb begin
    for (int p = 0; p < N; p++)
      conn[p] = (scheme == SCHEME_MFRR) ? conn_rr[p] : conn_ds[p];
  end

  // space stage
  always_comb begin
    il_valid = '0;
    for (int l = 0; l < M; l++) begin
      il_fanout[l] = '0;
      il_data[l]   = '0;
    end
    for (int p = 0; p < N; p++) begin
      hol_ready[p] = il_ready[conn[p]];
      if (hol_valid[p]) begin
        il_valid[conn[p]]  = 1'b1;
        il_fanout[conn[p]] = hol_fanout[p];
        il_data[conn[p]]   = hol_data[p];
      end
    end
  end

  // the connection pattern must be one-to-one
  for (genvar a = 0; a < N; a++) begin : g_chk_a
    for (genvar b = a + 1; b < N; b++) begin : g_chk_b
      a_one_to_one: assert property (@(posedge clk) disable iff (!rst_n) conn[a] != conn[b])
        else $error("IM inputs %0d and %0d share link %0d", a, b, conn[a]);
    end
  end

endmodule
