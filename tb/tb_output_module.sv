// tb_output_module - self-checking test of output_module (OM 2 of C(4,7,4)).
// Random cells arrive from the m CMs, each wanting at least one port of
// this OM; the line cards apply random back-pressure. Output q must receive
// one copy of every cell whose fan-out bit 2*n+q is set, in per-link order,
// with the fan-out vector and payload unchanged, and nothing else.
module tb_output_module;
  localparam int unsigned N = 4, M = 7, R = 4, NP = N * R, DW = 32, IDX = 2;
  logic clk = 0, rst_n = 0;
  logic [M-1:0]  in_valid, in_ready;
  logic [N-1:0]  out_valid, out_ready;
  logic [NP-1:0] in_fanout [M], out_fanout [N];
  logic [DW-1:0] in_data [M], out_data [N];
  logic [N-1:0]  grant_mask [M];
  int checks = 0, failures = 0, n_multi = 0, n_single = 0;
  logic [NP-1:0] sent [M][$];
  int nxt [M][N];
  int seqn [M];
  int copies_exp = 0, copies_got = 0;

  output_module #(.N(N), .M(M), .R(R), .DW(DW), .OM_IDX(IDX)) dut (.*);

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

  function automatic int next_for(int s, int q, int from);
    for (int k = from; k < sent[s].size(); k++) if (sent[s][k][IDX * N + q]) return k;
    return -1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < M; k++)
      if (in_valid[k] && in_ready[k]) begin
        int c;
        c = $countones(in_fanout[k][IDX*N +: N]);
        sent[k].push_back(in_fanout[k]);
        copies_exp += c;
        if (c > 1) n_multi++; else n_single++;
        seqn[k]++;
      end
    for (int q = 0; q < N; q++)
      if (out_valid[q]) begin
        int s, x, e;
        s = int'(out_data[q][31:24]);
        x = int'(out_data[q][23:0]);
        e = (s < M) ? next_for(s, q, nxt[s][q]) : -2;
        chk(out_ready[q], "copy only to a ready port");
        chk(x == e, $sformatf("port %0d got link %0d seq %0d exp %0d", q, s, x, e));
        if (x == e) chk(out_fanout[q] == sent[s][x], "fan-out vector carried unchanged");
        if (s < M) nxt[s][q] = x + 1;
        copies_got++;
      end
  end

  initial begin
    in_valid = 0; out_ready = 0;
    for (int k = 0; k < M; k++) begin
      in_fanout[k] = 0; in_data[k] = 0; seqn[k] = 0;
      for (int q = 0; q < N; q++) nxt[k][q] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      for (int k = 0; k < M; k++) begin
        in_valid[k]  = ($urandom % 5) == 0;
        in_fanout[k] = NP'($urandom);
        if (in_fanout[k][IDX*N +: N] == 0) in_fanout[k][IDX*N + ($urandom % N)] = 1'b1;
        if (($urandom % 2) == 0) in_fanout[k][IDX*N +: N] = N'(1 << ($urandom % N));
        in_data[k]   = {8'(k), 24'(seqn[k])};
      end
      out_ready = N'($urandom) | N'($urandom);
    end
    @(negedge clk);
    in_valid = 0; out_ready = '1;
    repeat (80) @(posedge clk);
    chk(copies_got == copies_exp, $sformatf("all copies delivered: %0d of %0d", copies_got, copies_exp));
    $display("multi-port cells=%0d single-port cells=%0d", n_multi, n_single);
    chk(n_multi > 0 && n_single > 0, "both cell kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
