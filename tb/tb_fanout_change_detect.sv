// tb_fanout_change_detect - self-checking test of fanout_change_detect.
// Feeds head-of-line fan-out vectors (with idle gaps and repeats) and
// checks that a change is flagged exactly once when a new vector reaches
// the head, and never for the first cell after reset.
module tb_fanout_change_detect;
  localparam int unsigned NP = 16;
  logic clk = 0, rst_n = 0;
  logic hol_valid;
  logic [NP-1:0] hol_fanout;
  logic change;
  int checks = 0, failures = 0, changes = 0;
  logic [NP-1:0] last;
  bit seen;

  fanout_change_detect #(.NPORTS(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hol_valid = 0; hol_fanout = NP'(3); seen = 0; last = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      hol_valid = ($urandom % 4) != 0;
      if (($urandom % 5) == 0) hol_fanout = NP'($urandom % 4 + 1);
      #1;
      checks++;
      if (change !== (hol_valid && seen && hol_fanout != last)) begin
        failures++;
        $display("FAIL cyc %0d: change=%b", cyc, change);
      end
      if (change) changes++;
      if (hol_valid) begin seen = 1; last = hol_fanout; end
    end
    checks++;
    if (changes == 0) begin failures++; $display("FAIL: no change seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
