// mfrr_ctrl - MFRR (multicast flow-based round robin) dispatcher of one IM.
//
// Each input keeps its interstage link for as long as its flow lasts, so
// all cells of a packet cross the same central module and cannot overtake
// one another. When input p starts a new flow (change[p]) it takes the link
// at the top of the AvailableList and puts the link it held at the bottom.
// Other inputs are not disturbed. When several inputs change in the same
// cycle they are served one after another in an order that starts at an
// input chosen by a 16-bit LFSR and runs round from there; this randomised
// order is this design's reading of "ties are broken randomly". Work per
// input is constant, whatever m.
//
// conn[p] is the link input p uses in the current cycle; it already
// reflects this cycle's changes (combinational from change), and is stored
// at the clock edge. After reset input p uses link p.
module mfrr_ctrl #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 7,
  localparam int unsigned LW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  change,
  output logic [LW-1:0] conn [N]
);
  logic [LW-1:0] conn_q   [N];
  logic [LW-1:0] push_val [N];
  logic [LW-1:0] pop_val  [N];
  logic [LW-1:0] list_q   [M-N];
  logic [CW-1:0] num;
  int unsigned   order    [N];
  logic [15:0]   lfsr_q;
  int unsigned   start;

  // x^16 + x^14 + x^13 + x^11 + 1, Fibonacci form
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr_q <= 16'hACE1;
    else        lfsr_q <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
  end

  assign start = int'(lfsr_q) % N;

  // Put the changing inputs in service order and collect the links they release.
  always_comb begin
    int unsigned cnt;
    int unsigned p;
    cnt = 0;
    for (int k = 0; k < N; k++) begin
      order[k]    = 0;
      push_val[k] = '0;
    end
    for (int k = 0; k < N; k++) begin
      p = (start + k) % N;
      if (change[p]) begin
        order[cnt]    = p;
        push_val[cnt] = conn_q[p];
        cnt++;
      end
    end
    num = CW'(cnt);
  end

  available_list #(.N(N), .M(M)) u_list (
    .clk, .rst_n, .num, .push_val, .pop_val, .list_q
  );

  always_comb begin
    for (int p = 0; p < N; p++) conn[p] = conn_q[p];
    for (int k = 0; k < N; k++)
      if (k < int'(num)) conn[order[k]] = pop_val[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) conn_q[p] <= LW'(p);
    end else begin
      conn_q <= conn;
    end
  end

endmodule
