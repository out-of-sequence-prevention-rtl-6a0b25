// tb_mfrr_ctrl - self-checking test of mfrr_ctrl.
// Replays the 4x6 example (I1 moves to link 5, list {6,1}; I4 moves to
// link 6, list {1,4}; I3 moves to link 1, list {4,3}), then random change patterns against a model with its own copy
// of the 16-bit LFSR that orders simultaneous changes. Also checks that
// inputs without a change never move and that the pattern stays
// one-to-one.
module tb_mfrr_ctrl;
  localparam int unsigned N = 4, M = 6, L = M - N, LW = $clog2(M);
  logic clk = 0, rst_n = 0;
  logic [N-1:0]  change;
  logic [LW-1:0] conn [N];
  int checks = 0, failures = 0, ties = 0;
  int mconn[N];
  int mlist[$];
  logic [15:0] lfsr;

  mfrr_ctrl #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // model of one cycle; returns the new connections
  task automatic model_step(input logic [N-1:0] chg);
    int start, ext[$], order[$];
    start = int'(lfsr) % N;
    for (int k = 0; k < N; k++) begin
      int p = (start + k) % N;
      if (chg[p]) order.push_back(p);
    end
    ext = mlist;
    foreach (order[j]) ext.push_back(mconn[order[j]]);
    foreach (order[j]) mconn[order[j]] = ext[j];
    mlist = ext[order.size() : order.size() + L - 1];
    if (order.size() > 1) ties++;
  endtask

  always @(posedge clk)
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    change = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < N; p++) mconn[p] = p;
    mlist = '{4, 5};
    @(negedge clk);
    for (int p = 0; p < N; p++) chk(conn[p] == LW'(p), "initial pattern");
    change = 4'b0001;
    #1 chk(conn[0] == 4 && conn[1] == 1 && conn[2] == 2 && conn[3] == 3, "I1 -> IL5");
    model_step(change);
    @(negedge clk);
    chk(dut.list_q[0] == 5 && dut.list_q[1] == 0, "list {6,1}");
    change = 4'b1000;
    #1 chk(conn[0] == 4 && conn[1] == 1 && conn[2] == 2 && conn[3] == 5, "I4 -> IL6");
    model_step(change);
    @(negedge clk);
    chk(dut.list_q[0] == 0 && dut.list_q[1] == 3, "list {1,4}");
    change = 4'b0100;
    #1 chk(conn[0] == 4 && conn[1] == 1 && conn[2] == 0 && conn[3] == 5, "I3 -> IL1");
    model_step(change);
    @(negedge clk);
    chk(dut.list_q[0] == 3 && dut.list_q[1] == 2, "list {4,3}");
    change = 4'b0000;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int prev_conn[N];
      @(negedge clk);
      change = (($urandom % 2) == 0) ? N'($urandom) : '0;
      prev_conn = mconn;
      model_step(change);
      #1;
      for (int p = 0; p < N; p++) begin
        chk(int'(conn[p]) == mconn[p], $sformatf("cyc %0d input %0d got %0d exp %0d", cyc, p, conn[p], mconn[p]));
        if (!change[p]) chk(int'(conn[p]) == prev_conn[p], "unchanged input kept its link");
        for (int q = p + 1; q < N; q++) chk(conn[p] != conn[q], "one-to-one");
      end
    end
    chk(ties > 0, "simultaneous changes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
