// tb_mc_xbar - self-checking test of mc_xbar.
// Phase 1: one cell into an empty switch leaves one cycle after it is
// written, copied to all its outputs at once. Phase 2: random multicast
// traffic with random output back-pressure; every copy is checked against
// the per-source order of the cells that want that output, and at the end
// every requested copy must have arrived exactly once. Phase 3: all inputs
// loaded with cells for output 0; the grants must rotate round robin.
module tb_mc_xbar;
  localparam int unsigned NI = 3, NO = 4, W = 32, QD = 4;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] in_valid, in_ready;
  logic [NO-1:0] in_mask [NI];
  logic [W-1:0]  in_data [NI];
  logic [NO-1:0] out_valid, out_ready;
  logic [W-1:0]  out_data [NO];
  logic [NO-1:0] grant_mask [NI];
  int checks = 0, failures = 0;
  int n_multi = 0, n_split = 0, n_bp = 0;

  logic [NO-1:0] sent_mask [NI][$];   // mask of every cell written, by source
  int nxt [NI][NO];                   // next sequence number expected per (source, output)
  int copies_exp = 0, copies_got = 0;
  int seqn [NI];
  int seen_grant [NI];                // cycles in which the current head got grants

  mc_xbar #(.NI(NI), .NO(NO), .W(W), .QDEPTH(QD)) dut (.*);

  always #5 clk = ~clk;

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

  function automatic int next_for(int s, int o, int from);
    for (int q = from; q < sent_mask[s].size(); q++) if (sent_mask[s][q][o]) return q;
    return -1;
  endfunction

  // scoreboard on every output copy
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NI; i++) begin
      if ($countones(grant_mask[i]) > 1) n_multi++;
      if (grant_mask[i] != 0 && dut.eff[i] != grant_mask[i]) seen_grant[i]++;
      if (in_valid[i] && in_ready[i]) begin
        sent_mask[i].push_back(in_mask[i]);
        copies_exp += $countones(in_mask[i]);
        seqn[i]++;
      end
    end
    for (int o = 0; o < NO; o++) begin
      if (out_valid[o]) begin
        int s, q, e;
        s = int'(out_data[o][31:24]);
        q = int'(out_data[o][23:0]);
        chk(out_ready[o], "copy only to a ready output");
        e = (s < NI) ? next_for(s, o, nxt[s][o]) : -2;
        chk(q == e, $sformatf("output %0d got src %0d seq %0d exp %0d", o, s, q, e));
        if (s < NI) nxt[s][o] = q + 1;
        copies_got++;
      end
    end
  end

  task automatic push(input int i, input logic [NO-1:0] m);
    in_valid[i] = 1;
    in_mask[i]  = m;
    in_data[i]  = {8'(i), 24'(seqn[i])};
  endtask


  initial begin
    in_valid = 0; out_ready = 0;
    for (int i = 0; i < NI; i++) begin in_mask[i] = 0; in_data[i] = 0; seqn[i] = 0; end
    for (int i = 0; i < NI; i++) for (int o = 0; o < NO; o++) nxt[i][o] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // phase 1: latency and multicast in one cycle
    @(negedge clk);
    out_ready = '1;
    push(1, 4'b1011);
    @(posedge clk); #1; in_valid = 0;
    chk(out_valid == 4'b1011, "copies one cycle after the write, all at once");
    chk(grant_mask[1] == 4'b1011, "grant mask of input 1");
    @(posedge clk); #1;
    chk(out_valid == 0 && !dut.hol_valid[1], "cell left after its copies");
    // phase 2: random traffic
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        if (($urandom % 2) == 0) push(i, NO'($urandom % ((1 << NO) - 1) + 1));
        else in_valid[i] = 0;
      end
      out_ready = NO'($urandom) | NO'($urandom);
      if (out_ready != '1) n_bp++;
      @(posedge clk); #1;
    end
    // drain
    @(negedge clk);
    in_valid = 0; out_ready = '1;
    repeat (40) @(posedge clk);
    chk(copies_got == copies_exp, $sformatf("all copies delivered: %0d of %0d", copies_got, copies_exp));
    n_split = 0;
    for (int i = 0; i < NI; i++) n_split += seen_grant[i];
    // phase 3: round-robin rotation on output 0
    @(negedge clk);
    out_ready = '0;
    for (int k = 0; k < QD; k++) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++) push(i, 4'b0001);
      @(posedge clk); #1;
    end
    @(negedge clk);
    in_valid = 0; out_ready = 4'b0001;
    begin
      int prev = -1;
      for (int k = 0; k < NI * QD; k++) begin
        @(posedge clk);
        chk(out_valid[0], "output 0 busy while cells wait");
        if (prev >= 0) chk(int'(out_data[0][31:24]) == (prev + 1) % NI, "round-robin order");
        prev = int'(out_data[0][31:24]);
      end
    end
    @(negedge clk);
    chk(copies_got == copies_exp, "phase 3 copies delivered");
    $display("multicast-grants=%0d partial-grants=%0d backpressure-cycles=%0d", n_multi, n_split, n_bp);
    chk(n_multi > 0 && n_split > 0 && n_bp > 0, "multicast, fan-out splitting and back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
