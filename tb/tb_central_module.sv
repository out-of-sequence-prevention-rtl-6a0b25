// tb_central_module - self-checking test of central_module (C(4,7,4) sizes).
// Random multicast cells from the r IMs, random back-pressure from the OMs.
// The expected OM set of each cell is worked out from its fan-out vector,
// one bit-cluster of n bits per OM; each OM link must receive one copy of
// every cell with a non-zero cluster for it, in per-source order, with the
// fan-out vector and payload unchanged, and nothing else.
module tb_central_module;
  localparam int unsigned N = 4, R = 4, NP = N * R, DW = 32;
  logic clk = 0, rst_n = 0;
  logic [R-1:0]  in_valid, in_ready, out_valid, out_ready;
  logic [NP-1:0] in_fanout [R], out_fanout [R];
  logic [DW-1:0] in_data [R], out_data [R];
  logic [R-1:0]  grant_mask [R];
  int checks = 0, failures = 0, n_multi = 0, n_single = 0;
  logic [NP-1:0] sent [R][$];
  int nxt [R][R];
  int seqn [R];
  int copies_exp = 0, copies_got = 0;

  central_module #(.N(N), .R(R), .DW(DW)) dut (.*);

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

  function automatic bit wants(logic [NP-1:0] f, int d);
    for (int b = 0; b < N; b++) if (f[d * N + b]) return 1;
    return 0;
  endfunction

  function automatic int next_for(int s, int d, int from);
    for (int q = from; q < sent[s].size(); q++) if (wants(sent[s][q], d)) return q;
    return -1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < R; i++)
      if (in_valid[i] && in_ready[i]) begin
        int c;
        c = 0;
        sent[i].push_back(in_fanout[i]);
        for (int d = 0; d < R; d++) c += int'(wants(in_fanout[i], d));
        copies_exp += c;
        if (c > 1) n_multi++; else n_single++;
        seqn[i]++;
      end
    for (int d = 0; d < R; d++)
      if (out_valid[d]) begin
        int s, q, e;
        s = int'(out_data[d][31:24]);
        q = int'(out_data[d][23:0]);
        e = (s < R) ? next_for(s, d, nxt[s][d]) : -2;
        chk(out_ready[d], "copy only to a ready OM");
        chk(q == e, $sformatf("OM %0d got src %0d seq %0d exp %0d", d, s, q, e));
        if (q == e) chk(out_fanout[d] == sent[s][q], "fan-out vector carried unchanged");
        if (s < R) nxt[s][d] = q + 1;
        copies_got++;
      end
  end

  initial begin
    in_valid = 0; out_ready = 0;
    for (int i = 0; i < R; i++) begin
      in_fanout[i] = 0; in_data[i] = 0; seqn[i] = 0;
      for (int d = 0; d < R; d++) nxt[i][d] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < R; i++) begin
        in_valid[i]  = ($urandom % 2) == 0;
        // sparse vectors so that some cells need one OM and some several
        in_fanout[i] = NP'($urandom & $urandom & $urandom);
        if (in_fanout[i] == 0) in_fanout[i] = NP'(1 << ($urandom % NP));
        in_data[i]   = {8'(i), 24'(seqn[i])};
      end
      out_ready = R'($urandom) | R'($urandom);
    end
    @(negedge clk);
    in_valid = 0; out_ready = '1;
    repeat (60) @(posedge clk);
    chk(copies_got == copies_exp, $sformatf("all copies delivered: %0d of %0d", copies_got, copies_exp));
    $display("multi-OM cells=%0d single-OM cells=%0d", n_multi, n_single);
    chk(n_multi > 0 && n_single > 0, "both cell kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
