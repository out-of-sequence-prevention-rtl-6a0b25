// tb_input_module - self-checking test of input_module.
// Each input is fed a stream of flows (runs of cells with one fan-out
// vector) with random gaps; the links accept cells at random. Run once
// per dispatching scheme, with a reset in between. Every cycle the test
// predicts the change flags, the connection pattern (offset model for
// MF-DSRR, free-list model with its own LFSR copy for MFRR), which link
// carries which head cell and which heads are accepted.
module tb_input_module;
  import clos_pkg::*;
  localparam int unsigned N = 4, M = 7, NP = 16, DW = 32, L = M - N, LW = $clog2(M);
  logic clk = 0, rst_n = 0;
  scheme_e scheme;
  logic [N-1:0]  hol_valid, hol_ready;
  logic [NP-1:0] hol_fanout [N];
  logic [DW-1:0] hol_data   [N];
  logic [M-1:0]  il_valid, il_ready;
  logic [NP-1:0] il_fanout  [M];
  logic [DW-1:0] il_data    [M];
  logic [N-1:0]  change;
  logic [LW-1:0] conn [N];
  int checks = 0, failures = 0;
  int n_change = 0, n_tie = 0, n_stall = 0, n_sent = 0;

  // models
  int mconn[N];
  int mlist[$];
  int off;
  logic [15:0] lfsr;
  bit seen[N];
  logic [NP-1:0] last[N];
  int left_in_flow[N];

  input_module #(.N(N), .M(M), .NPORTS(NP), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk)
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_head(input int p);
    if (left_in_flow[p] == 0) begin
      hol_fanout[p] = NP'($urandom % 7 + 1);
      left_in_flow[p] = $urandom % 4 + 1;
    end
    left_in_flow[p]--;
    hol_data[p] = $urandom;
  endtask

  task automatic run(input scheme_e s);
    scheme = s;
    rst_n = 0;
    hol_valid = '0; il_ready = '0;
    for (int p = 0; p < N; p++) begin
      seen[p] = 0; last[p] = 0; left_in_flow[p] = 0; mconn[p] = p;
      new_head(p);
    end
    mlist = {};
    for (int i = 0; i < L; i++) mlist.push_back(N + i);
    off = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic [N-1:0] echg;
      int order[$], ext[$], start;
      @(negedge clk);
      for (int p = 0; p < N; p++) if (!hol_valid[p]) hol_valid[p] = ($urandom % 3) != 0;
      il_ready = M'($urandom) | M'($urandom);
      for (int p = 0; p < N; p++) echg[p] = hol_valid[p] && seen[p] && hol_fanout[p] != last[p];
      // expected pattern
      if (s == SCHEME_MFDSRR) begin
        if (echg != 0) off = (off + 1) % M;
        for (int p = 0; p < N; p++) mconn[p] = (p + off) % M;
      end else begin
        start = int'(lfsr) % N;
        for (int k = 0; k < N; k++) if (echg[(start + k) % N]) order.push_back((start + k) % N);
        ext = mlist;
        foreach (order[j]) ext.push_back(mconn[order[j]]);
        foreach (order[j]) mconn[order[j]] = ext[j];
        mlist = ext[order.size() : order.size() + L - 1];
      end
      #1;
      chk(change == echg, $sformatf("change flags %b exp %b", change, echg));
      n_change += $countones(echg);
      if ($countones(echg) > 1) n_tie++;
      for (int p = 0; p < N; p++) begin
        chk(int'(conn[p]) == mconn[p], $sformatf("cyc %0d conn[%0d]=%0d exp %0d", cyc, p, conn[p], mconn[p]));
        chk(hol_ready[p] == il_ready[mconn[p]], "hol_ready follows its link");
      end
      for (int l = 0; l < M; l++) begin
        int src = -1;
        for (int p = 0; p < N; p++) if (hol_valid[p] && mconn[p] == l) src = p;
        chk(il_valid[l] == (src >= 0), $sformatf("link %0d valid", l));
        if (src >= 0)
          chk(il_fanout[l] == hol_fanout[src] && il_data[l] == hol_data[src], $sformatf("link %0d data", l));
      end
      for (int p = 0; p < N; p++) if (hol_valid[p]) begin seen[p] = 1; last[p] = hol_fanout[p]; end
      @(posedge clk);
      #1;
      for (int p = 0; p < N; p++) begin
        if (hol_valid[p] && !il_ready[mconn[p]]) n_stall++;
        if (hol_valid[p] && il_ready[mconn[p]]) begin
          n_sent++;
          hol_valid[p] = 0;
          new_head(p);
        end
      end
    end
  endtask

  initial begin
    run(SCHEME_MFRR);
    run(SCHEME_MFDSRR);
    $display("changes=%0d simultaneous=%0d stalls=%0d cells=%0d", n_change, n_tie, n_stall, n_sent);
    chk(n_change > 0 && n_tie > 0 && n_stall > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
