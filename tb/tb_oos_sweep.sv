// tb_oos_sweep - out-of-sequence measurement over offered load for the
// C(4,7,4) switch at its default parameters.
//
// Same traffic, scoreboard and mechanism counters as tb_clos_switch, but
// the line cards never hold cells back. Runs at offered loads of 10% to
// 70% per output, under MFRR and under MF-DSRR. Every run checks delivery
// (each cell exactly once, at exactly the ports of its fan-out vector);
// MFRR runs must show no in-packet out-of-sequence cell. The percentages
// of in-packet and inter-packet out-of-sequence cells are printed per run,
// with the mean delay of a cell copy through the switch and the mean and
// peak number of cells the output line cards hold only to restore packet
// order (a reorder buffer, which MFRR must never need). The test also
// checks that MF-DSRR has at least as many in-packet out-of-sequence cells
// as MFRR at every load, and more at 70%.
module tb_oos_sweep;
  import clos_pkg::*;
  localparam int unsigned N = N_DEF, M = M_DEF, R = R_DEF, NP = N * R, DW = DW_DEF;
  localparam int unsigned L = M - N;

  logic clk = 0, rst_n = 0;
  scheme_e scheme;
  logic [NP-1:0] in_valid, in_ready, out_valid, out_ready;
  logic [NP-1:0] in_fanout [NP], out_fanout [NP];
  logic [DW-1:0] in_data [NP], out_data [NP];

  clos_switch dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sources ----------------
  typedef struct {
    logic [NP-1:0] fanout;
    int            len;
  } pkt_t;
  pkt_t pkts [NP][$];                 // packets issued, by source and packet number
  logic [DW-1:0] pend_data [NP][$];   // cells waiting at the line card
  logic [NP-1:0] pend_fan  [NP][$];
  int load_pct;
  bit gen_on;

  function automatic logic [NP-1:0] rand_fanout();
    logic [NP-1:0] f;
    do begin
      f = '0;
      for (int j = 0; j < NP; j++) f[j] = ($urandom % 4) == 0;
    end while (f == 0);
    return f;
  endfunction

  task automatic new_packet(input int g, input logic [NP-1:0] f, input int len);
    pkt_t p;
    int id;
    p.fanout = f;
    p.len    = len;
    id = pkts[g].size();
    pkts[g].push_back(p);
    for (int c = 0; c < len; c++) begin
      pend_data[g].push_back({8'(g), 16'(id), 8'(c)});
      pend_fan[g].push_back(f);
    end
  endtask

  // ---------------- scoreboard ----------------
  bit got [bit [39:0]];               // {src, pkt, output, cell} already delivered
  int nxt_cell [bit [31:0]];          // {src, pkt, output} -> next cell expected
  int max_pkt [NP][NP];               // highest packet seen, by source and output
  int copies_exp, copies_got, oos_in, oos_inter;
  int oos_rr [8], oos_ds [8];
  // delay and reorder-buffer measurement
  longint cyc_now;
  longint t_acc [bit [31:0]];         // {src, pkt, cell} -> cycle accepted
  int     rx_map [bit [31:0]];        // {src, pkt, output} -> cells received (bit per cell)
  int     rx_pre [bit [31:0]];        // {src, pkt, output} -> cells released in order
  longint delay_sum, held_sum, meas_cycles;
  int     held_now, held_max;

  always @(posedge clk) if (rst_n) begin
    cyc_now++;
    held_sum += held_now;
    meas_cycles++;
    for (int g = 0; g < NP; g++)
      if (in_valid[g] && in_ready[g]) begin
        t_acc[{pend_data[g][0][31:24], pend_data[g][0][23:8], pend_data[g][0][7:0]}] = cyc_now;
        copies_exp += $countones(pend_fan[g][0]);
        void'(pend_data[g].pop_front());
        void'(pend_fan[g].pop_front());
      end
    for (int o = 0; o < NP; o++)
      if (out_valid[o]) begin
        int s, pk, c;
        bit [31:0] k3;
        s  = int'(out_data[o][31:24]);
        pk = int'(out_data[o][23:8]);
        c  = int'(out_data[o][7:0]);
        copies_got++;
        chk(out_ready[o], "copy only to a ready line card");
        if (s >= NP || pk >= pkts[s].size()) begin
          chk(0, $sformatf("output %0d: unknown cell %h", o, out_data[o]));
        end else begin
          chk(out_fanout[o] == pkts[s][pk].fanout, "fan-out vector intact");
          chk(pkts[s][pk].fanout[o], $sformatf("output %0d not in fan-out of src %0d pkt %0d", o, s, pk));
          chk(c < pkts[s][pk].len, "cell index in range");
          chk(!got.exists({8'(s), 16'(pk), 8'(o), 8'(c)}), "no duplicate copy");
          got[{8'(s), 16'(pk), 8'(o), 8'(c)}] = 1;
          k3 = {8'(s), 16'(pk), 8'(o)};
          if (!nxt_cell.exists(k3)) nxt_cell[k3] = 0;
          if (c != nxt_cell[k3]) oos_in++;
          if (c + 1 > nxt_cell[k3]) nxt_cell[k3] = c + 1;
          if (pk < max_pkt[s][o]) oos_inter++;
          delay_sum += cyc_now - t_acc[{8'(s), 16'(pk), 8'(c)}];
          // reorder buffer at this output: a cell is held until all
          // earlier cells of its packet have arrived
          if (!rx_map.exists(k3)) begin rx_map[k3] = 0; rx_pre[k3] = 0; end
          rx_map[k3] = rx_map[k3] | (1 << c);
          if (c == rx_pre[k3]) begin
            rx_pre[k3]++;
            while (rx_pre[k3] < 32 && rx_map[k3][rx_pre[k3]]) begin
              rx_pre[k3]++;
              held_now--;
            end
          end else begin
            held_now++;
            if (held_now > held_max) held_max = held_now;
          end
          if (pk > max_pkt[s][o]) max_pkt[s][o] = pk;
        end
      end
  end

  // ---------------- mechanism counters ----------------
  int n_change, n_tie, n_list_reuse, n_shift_wrap, n_im_stall, n_inq_full;
  int n_cm_multi, n_cm_split, n_om_multi, n_out_bp;

  for (genvar i = 0; i < R; i++) begin : g_mon_im
    always @(posedge clk) if (rst_n) begin
      n_change += $countones(dut.g_im[i].change);
      if ($countones(dut.g_im[i].change) > 1) n_tie++;
      if (scheme == SCHEME_MFRR && int'(dut.g_im[i].u_im.u_mfrr.num) > L) n_list_reuse++;
      if (scheme == SCHEME_MFDSRR && dut.g_im[i].change != 0 &&
          dut.g_im[i].u_im.u_mfdsrr.off_q == 3'(M - 1)) n_shift_wrap++;
    end
  end
  for (genvar k = 0; k < M; k++) begin : g_mon_cm
    always @(posedge clk) if (rst_n)
      for (int i = 0; i < R; i++) begin
        if ($countones(dut.g_cm[k].grant_mask[i]) > 1) n_cm_multi++;
        if (dut.g_cm[k].grant_mask[i] != 0 && dut.g_cm[k].u_cm.u_xbar.left[i] != 0) n_cm_split++;
      end
  end
  for (genvar j = 0; j < R; j++) begin : g_mon_om
    always @(posedge clk) if (rst_n)
      for (int k = 0; k < M; k++)
        if ($countones(dut.g_om[j].grant_mask[k]) > 1) n_om_multi++;
  end
  always @(posedge clk) if (rst_n) begin
    n_im_stall += $countones(dut.hol_valid & ~dut.hol_ready);
    n_inq_full += $countones(in_valid & ~in_ready);
    n_out_bp   += $countones(~out_ready);
  end

  // ---------------- drivers ----------------
  always @(negedge clk) begin
    for (int g = 0; g < NP; g++) begin
      // mean cells per cycle per input = load / E(F) = load / 4; a packet
      // has 12 cells on average, so a new packet starts with
      // probability load / 48 per cycle
      if (gen_on && ($urandom % 4800) < load_pct) new_packet(g, rand_fanout(), $urandom % 23 + 1);
      in_valid[g] = pend_data[g].size() != 0;
      if (in_valid[g]) begin
        in_data[g]   = pend_data[g][0];
        in_fanout[g] = pend_fan[g][0];
      end
    end
    out_ready = '1;   // line cards always accept, as in the evaluated setup
  end

  task automatic run(input scheme_e s, input int load, input int cycles);
    int t0, lat;
    scheme = s;
    rst_n  = 0;
    gen_on = 0;
    load_pct = load;
    got.delete();
    nxt_cell.delete();
    for (int g = 0; g < NP; g++) begin
      pkts[g].delete(); pend_data[g].delete(); pend_fan[g].delete();
      for (int o = 0; o < NP; o++) max_pkt[g][o] = 0;
    end
    copies_exp = 0; copies_got = 0; oos_in = 0; oos_inter = 0;
    t_acc.delete(); rx_map.delete(); rx_pre.delete();
    cyc_now = 0; delay_sum = 0; held_sum = 0; meas_cycles = 0; held_now = 0; held_max = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // minimum latency: one single-cell packet from input 0 to output 5
    @(posedge clk); #1;
    new_packet(0, NP'(1 << 5), 1);
    t0 = 0; lat = -1;
    while (lat < 0 && t0 < 20) begin
      @(posedge clk); t0++;
      if (out_valid[5]) lat = t0;
    end
    // the cell is accepted at the first edge; its copy leaves at the output
    // three edges later (input queue, CM queue, OM queue)
    chk(lat - 1 == 3, $sformatf("minimum latency %0d cycles, expected 3", lat - 1));
    repeat (5) @(posedge clk);
    // directed burst: every input sends a one-cell flow, then starts a new
    // flow in the next cycle, so that all inputs of every IM change at once
    #1;
    for (int g = 0; g < NP; g++) new_packet(g, NP'(1 << g), 1);
    for (int g = 0; g < NP; g++) new_packet(g, NP'(1 << ((g + 1) % NP)), 3);
    repeat (20) @(posedge clk);
    // random traffic
    #1 gen_on = 1;
    repeat (cycles) @(posedge clk);
    #1 gen_on = 0;
    // drain
    begin
      int guard = 0;
      while ((copies_got != copies_exp || in_valid != 0) && guard < 20000) begin
        @(posedge clk); guard++;
      end
    end
    repeat (10) @(posedge clk);
    chk(copies_got == copies_exp, $sformatf("%s load %0d%%: copies delivered %0d of %0d",
        s.name(), load, copies_got, copies_exp));
    begin
      int cells_sent = 0;
      for (int g = 0; g < NP; g++) foreach (pkts[g][p]) cells_sent += pkts[g][p].len * $countones(pkts[g][p].fanout);
      chk(cells_sent == copies_exp, "every issued cell entered the switch");
    end
    chk(held_now == 0, "reorder buffer empty after drain");
    if (s == SCHEME_MFRR) chk(held_max == 0, "MFRR never needs the reorder buffer");
    $display("%-14s load %0d%%: mean cell delay %0.2f cycles, reorder buffer mean %0.3f / peak %0d cells",
             s.name(), load, real'(delay_sum) / copies_got, real'(held_sum) / meas_cycles, held_max);
    if (s == SCHEME_MFRR) chk(oos_in == 0, $sformatf("MFRR in-packet out-of-sequence cells: %0d", oos_in));
    $display("%-14s load %0d%%: copies %0d, in-packet OOS %0d (%0.2f%%), inter-packet OOS %0d (%0.2f%%)",
             s.name(), load, copies_got, oos_in, 100.0 * oos_in / copies_got,
             oos_inter, 100.0 * oos_inter / copies_got);
  endtask

  initial begin
    in_valid = '0; out_ready = '1; gen_on = 0; load_pct = 0;
    for (int g = 0; g < NP; g++) begin in_fanout[g] = '0; in_data[g] = '0; end
    {n_change, n_tie, n_list_reuse, n_shift_wrap, n_im_stall, n_inq_full} = '0;
    {n_cm_multi, n_cm_split, n_om_multi, n_out_bp} = '0;
    for (int ld = 1; ld <= 7; ld++) begin
      run(SCHEME_MFRR, ld * 10, 3000);
      oos_rr[ld] = oos_in;
      run(SCHEME_MFDSRR, ld * 10, 3000);
      oos_ds[ld] = oos_in;
      chk(oos_ds[ld] >= oos_rr[ld], "MF-DSRR has no fewer in-packet OOS cells than MFRR");
    end
    chk(oos_ds[7] > oos_rr[7], "MF-DSRR suffers in-packet OOS at high load");
    $display("flow changes %0d, simultaneous changes %0d, list reuse in cycle %0d, MF-DSRR wraps %0d",
             n_change, n_tie, n_list_reuse, n_shift_wrap);
    $display("IM stalls %0d, input queue full %0d, CM multicast %0d, CM split %0d, OM multicast %0d, output hold %0d",
             n_im_stall, n_inq_full, n_cm_multi, n_cm_split, n_om_multi, n_out_bp);
    chk(n_change > 0,     "flow changes seen");
    chk(n_tie > 0,        "simultaneous flow changes seen");
    chk(n_list_reuse > 0, "MFRR handed out a link released in the same cycle");
    chk(n_shift_wrap > 0, "MF-DSRR pattern wrapped after m shifts");
    chk(n_im_stall > 0,   "IM head cell stalled by a full CM queue");
    chk(n_inq_full > 0,   "input queue full");
    chk(n_cm_multi > 0,   "CM multicast copy");
    chk(n_cm_split > 0,   "CM fan-out split over cycles");
    chk(n_om_multi > 0,   "OM multicast copy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
