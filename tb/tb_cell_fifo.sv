// tb_cell_fifo - self-checking test of cell_fifo.
// Random pushes and pops against a queue model: checks the order of the
// data, the full and empty flags, and that a cell written into an empty
// queue is at the head one cycle later.
module tb_cell_fifo;
  localparam int unsigned W = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int fulls = 0;

  cell_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!out_valid && in_ready, "empty after reset");
    // latency: write one cell, visible next cycle
    in_valid = 1; in_data = 16'hBEEF;
    @(posedge clk); #1 model.push_back(16'hBEEF);
    in_valid = 0;
    chk(out_valid && out_data == 16'hBEEF, "one-cycle write latency");
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      out_ready = ($urandom % 2) != 0;
      in_data   = W'($urandom);
      chk(out_valid == (model.size() != 0), "out_valid flag");
      chk(in_ready == (model.size() != DEPTH), "in_ready flag");
      if (model.size() != 0) chk(out_data == model[0], $sformatf("head %h exp %h", out_data, model[0]));
      if (model.size() == DEPTH) fulls++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    chk(fulls > 0, "queue reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
