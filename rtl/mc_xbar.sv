// mc_xbar - input-queued multicast crossbar with a round-robin scheduler.
//
// The common core of the central and output modules. Each of the NI inputs
// has its own FIFO; a cell enters with a destination mask (bit o: a copy is
// wanted at output o) that the wrapper derives from the fan-out vector.
// Every cycle each output o that is ready grants one of the head-of-line
// cells still wanting a copy at o, searching round robin from the input
// after the one it granted last. A head cell may be granted by several
// outputs in one cycle and so copied to all of them at once (multicast).
// Copies still owed are kept in a residue mask; the cell leaves its queue
// once every requested copy has been sent (fan-out splitting). The
// scheduler is this design's choice, a simple round-robin multicast
// scheduler: the outputs act independently, so a grant is final in the
// cycle it is made. Copies appear on out_valid/out_data in the cycle they
// are granted; a cell written into an empty queue can be granted in the
// next cycle.
module mc_xbar #(
  parameter int unsigned NI     = 4,
  parameter int unsigned NO     = 4,
  parameter int unsigned W      = 48,
  parameter int unsigned QDEPTH = 8,
  localparam int unsigned IW = (NI > 1) ? $clog2(NI) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NI-1:0] in_valid,
  output logic [NI-1:0] in_ready,
  input  logic [NO-1:0] in_mask [NI],
  input  logic [W-1:0]  in_data [NI],
  output logic [NO-1:0] out_valid,
  input  logic [NO-1:0] out_ready,
  output logic [W-1:0]  out_data [NO],
  // monitoring: copies sent from each input's head cell in this cycle
  output logic [NO-1:0] grant_mask [NI]
);
  logic [NI-1:0] hol_valid, hol_pop;
  logic [NO-1:0] hol_mask [NI];
  logic [W-1:0]  hol_data [NI];
  logic [NO-1:0] res_q    [NI];
  logic [NI-1:0] resv_q;
  logic [NO-1:0] eff      [NI];
  logic [NO-1:0] left     [NI];
  logic [IW-1:0] ptr_q    [NO];
  logic [IW-1:0] gnt_idx  [NO];
  logic [NO-1:0] gnt_any;

  for (genvar i = 0; i < NI; i++) begin : g_q
    cell_fifo #(.W(NO + W), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_ready (in_ready[i]),
      .in_data  ({in_mask[i], in_data[i]}),
      .out_valid(hol_valid[i]),
      .out_ready(hol_pop[i]),
      .out_data ({hol_mask[i], hol_data[i]})
    );
  end

  always_comb begin
    for (int i = 0; i < NI; i++) eff[i] = resv_q[i] ? res_q[i] : hol_mask[i];
  end

  // one round-robin arbiter per output
  always_comb begin
    logic [IW-1:0] c;
    for (int o = 0; o < NO; o++) begin
      gnt_any[o] = 1'b0;
      gnt_idx[o] = '0;
      for (int k = 0; k < NI; k++) begin
        c = IW'((int'(ptr_q[o]) + k) % NI);
        if (!gnt_any[o] && out_ready[o] && hol_valid[c] && eff[c][o]) begin
          gnt_any[o] = 1'b1;
          gnt_idx[o] = IW'(c);
        end
      end
      out_valid[o] = gnt_any[o];
      out_data[o]  = hol_data[gnt_idx[o]];
    end
  end

  always_comb begin
    for (int i = 0; i < NI; i++) begin
      for (int o = 0; o < NO; o++)
        grant_mask[i][o] = gnt_any[o] && (gnt_idx[o] == IW'(i));
      left[i]    = eff[i] & ~grant_mask[i];
      hol_pop[i] = hol_valid[i] && (left[i] == '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resv_q <= '0;
      for (int i = 0; i < NI; i++) res_q[i] <= '0;
      for (int o = 0; o < NO; o++) ptr_q[o] <= '0;
    end else begin
      for (int i = 0; i < NI; i++) begin
        if (hol_valid[i]) begin
          resv_q[i] <= !hol_pop[i];
          res_q[i]  <= left[i];
        end
      end
      for (int o = 0; o < NO; o++)
        if (gnt_any[o])
          ptr_q[o] <= (gnt_idx[o] == IW'(NI - 1)) ? '0 : gnt_idx[o] + 1'b1;
    end
  end

endmodule
