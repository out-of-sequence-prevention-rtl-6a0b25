// tb_mfdsrr_ctrl - self-checking test of mfdsrr_ctrl.
// Replays the 4x6 example (pattern 1-2-3-4, then 2-3-4-5 after a change,
// then 3-4-5-6), then random change patterns against an offset model:
// input p uses link (p + offset) mod m, offset moving by one in any cycle
// with at least one change.
module tb_mfdsrr_ctrl;
  localparam int unsigned N = 4, M = 6, LW = $clog2(M);
  logic clk = 0, rst_n = 0;
  logic [N-1:0]  change;
  logic [LW-1:0] conn [N];
  int checks = 0, failures = 0, wraps = 0;
  int off;

  mfdsrr_ctrl #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    change = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < N; p++) chk(conn[p] == LW'(p), "initial pattern 1-2-3-4");
    change = 4'b0001;
    #1 for (int p = 0; p < N; p++) chk(conn[p] == LW'(p + 1), "after f1 change: 2-3-4-5");
    @(negedge clk);
    change = 4'b0000;
    #1 for (int p = 0; p < N; p++) chk(conn[p] == LW'(p + 1), "pattern held without change");
    @(negedge clk);
    change = 4'b0100;
    #1 for (int p = 0; p < N; p++) chk(conn[p] == LW'(p + 2), "further change: 3-4-5-6");
    off = 2;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      change = (($urandom % 3) == 0) ? N'($urandom) : '0;
      if (change != 0) begin
        off = (off + 1) % M;
        if (off == 0) wraps++;
      end
      #1;
      for (int p = 0; p < N; p++)
        chk(int'(conn[p]) == (p + off) % M, $sformatf("cyc %0d input %0d", cyc, p));
    end
    chk(wraps > 0, "pattern returned to start after m changes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
