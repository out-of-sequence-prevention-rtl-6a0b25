// available_list - the list of idle IM output links used by MFRR.
//
// An IM with n inputs and m outputs always has m-n outputs unused; this
// list holds them, oldest released first. Entries are only taken from the
// top and only added at the bottom. In one cycle `num` inputs change flow:
// the k-th of them (k < num, in service order) is handed pop_val[k] and
// gives back push_val[k], the link it releases. Service is sequential in
// effect: the k-th pop takes element k of the sequence "current list, then
// push_val[0], push_val[1], ...", so when more inputs change than the list
// holds, a later input receives a link released earlier in the same cycle.
// The list keeps m-n entries at all times. After reset it holds links
// n .. m-1 (0-based), top first, with input p connected to link p.
// pop_val is combinational; the list updates at the clock edge.
module available_list #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 7,
  localparam int unsigned L  = M - N,
  localparam int unsigned LW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] num,
  input  logic [LW-1:0] push_val [N],
  output logic [LW-1:0] pop_val  [N],
  output logic [LW-1:0] list_q   [L]
);
  logic [LW-1:0] ext    [L+N];
  logic [LW-1:0] list_d [L];

  initial begin
    assert (M > N) else $error("available_list needs m > n");
  end

  always_comb begin
    for (int i = 0; i < L; i++) ext[i] = list_q[i];
    for (int i = 0; i < N; i++) ext[L+i] = push_val[i];
    for (int k = 0; k < N; k++) pop_val[k] = ext[k];
    for (int i = 0; i < L; i++) list_d[i] = ext[i + ((int'(num) > N) ? N : int'(num))];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) list_q[i] <= LW'(N + i);
    end else begin
      list_q <= list_d;
    end
  end

endmodule
