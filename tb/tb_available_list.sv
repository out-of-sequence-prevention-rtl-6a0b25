// tb_available_list - self-checking test of available_list.
// First replays the 4x6 example: links 5 and 6 (4 and 5 counted from 0)
// free; input 1 takes 5 and frees 1, giving {6,1}; input 4 then takes 6
// and frees 4. Then random numbers of simultaneous pop/insert pairs,
// including more than the list holds, against a queue model.
module tb_available_list;
  localparam int unsigned N = 4, M = 6, L = M - N, LW = $clog2(M);
  logic clk = 0, rst_n = 0;
  logic [$clog2(N+1)-1:0] num;
  logic [LW-1:0] push_val [N];
  logic [LW-1:0] pop_val  [N];
  logic [LW-1:0] list_q   [L];
  int checks = 0, failures = 0, overflows = 0;
  int model[$];

  available_list #(.N(N), .M(M)) dut (.*);

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
    num = 0;
    for (int i = 0; i < N; i++) push_val[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(list_q[0] == 4 && list_q[1] == 5, "reset list {5,6}");
    num = 1; push_val[0] = 0;
    #1 chk(pop_val[0] == 4, "input 1 takes link 5");
    @(negedge clk);
    chk(list_q[0] == 5 && list_q[1] == 0, "list becomes {6,1}");
    push_val[0] = 3;
    #1 chk(pop_val[0] == 5, "input 4 takes link 6");
    @(negedge clk);
    chk(list_q[0] == 0 && list_q[1] == 3, "list becomes {1,4}");
    num = 0;
    model = '{0, 3};
    for (int cyc = 0; cyc < 2000; cyc++) begin
      int ext[$];
      int k;
      @(negedge clk);
      k = $urandom % (N + 1);
      num = k[$clog2(N+1)-1:0];
      for (int i = 0; i < N; i++) push_val[i] = LW'($urandom % M);
      ext = model;
      for (int i = 0; i < k; i++) ext.push_back(int'(push_val[i]));
      #1;
      for (int i = 0; i < k; i++)
        chk(int'(pop_val[i]) == ext[i], $sformatf("pop %0d got %0d exp %0d", i, pop_val[i], ext[i]));
      if (k > L) overflows++;
      model = ext[k : k + L - 1];
      @(posedge clk); #1;
      for (int i = 0; i < L; i++)
        chk(int'(list_q[i]) == model[i], $sformatf("list[%0d]", i));
    end
    chk(overflows > 0, "more changes than free links seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
