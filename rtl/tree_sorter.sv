// tree_sorter: K shifter sorters (K a power of two) in binary-tree
// composition, taking K scores per clock and keeping the N highest of the
// whole stream in sorter S_0.
//
// Burst (idle = 0): sorter S_i inserts input lane i when in_valid is high.
// Idle: the composition collapses in log2(K) rounds of N clocks. In round l
// every sorter whose index is a multiple of 2^(l+1) inserts the words shifted
// out of sorter i + 2^l, which collapses (empties its real data) in those N
// clocks; after the last round only S_0 holds real data. The mux input of
// sorter i is therefore
//     x_i = d_i                        during the burst,
//     x_i = infinity                   for odd i,
//     x_i = W_{i + 2^min(l, t_i - 1)}  otherwise,
// where t_i is the number of trailing zero bits of i (t_0 = log2 K) and l
// the current round; after its last receiving round a sorter keeps its
// last source, which by then only emits infinity. For K = 4 this gives the
// mux pattern of the paper's example (S_0 selects W_1 then W_2 by the
// counter MSB, S_2 takes W_3, S_1 and S_3 take infinity). The counter runs
// 0..N*log2(K) and raises data_ready at the end.
//
// As in linear_sorter (choices of this design): in_valid gates insertion,
// all sorters hold once data_ready is up, sorters S_1..S_{K-1} load zero
// instead of infinity on the final collapse clock, idle must stay high
// until data_ready rises, and `clr` clears everything.
module tree_sorter #(
  parameter int unsigned K  = rsu_pkg::GEN_K,
  parameter int unsigned N  = rsu_pkg::GEN_CELLS,
  parameter int unsigned DW = rsu_pkg::SCORE_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          idle,
  input  logic          in_valid,
  input  logic [DW-1:0] d [K],
  output logic          data_ready,
  output logic [DW-1:0] w0,
  output logic [DW-1:0] result [N]
);

  localparam int unsigned  L   = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned  MAX = N * L;
  localparam int unsigned  CW  = $clog2(MAX + 1);
  localparam logic [DW-1:0] INF = '1;

  // Trailing zero count of i, saturated at L (so tz(0) = L).
  function automatic int unsigned tz(int unsigned i);
    for (int unsigned b = 0; b < L; b++)
      if (i[b]) return b;
    return L;
  endfunction

  logic [DW-1:0] cells [K][N];
  logic [CW-1:0] count;
  int unsigned   round;
  logic          en;
  logic          last;  // final collapse clock

  flush_counter #(.MAX(MAX)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (idle),
    .count(count),
    .last (last),
    .done (data_ready)
  );

  // Current collapse round: floor(count / N), from compares against the
  // round boundaries.
  always_comb begin
    round = 0;
    for (int unsigned j = 1; j < L; j++)
      if (count >= CW'(j * N)) round = j;
  end

  assign en = idle ? !data_ready : in_valid;

  for (genvar i = 0; i < K; i++) begin : g_s
    localparam int unsigned T = tz(i);
    logic [DW-1:0] xi, wi;

    if (T == 0) begin : g_leaf
      assign xi = idle ? INF : d[i];
    end else begin : g_node
      // src[l]: word shifted out of the sorter this one absorbs in round l
      logic [DW-1:0] src [T];
      for (genvar l = 0; l < T; l++) begin : g_src
        assign src[l] = g_s[i + (1 << l)].wi;
      end
      assign xi = !idle ? d[i] : (round < T) ? src[round] : src[T-1];
    end

    shifter_sorter #(.N(N), .DW(DW)) u_s (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .clr  (clr || (i != 0 && last)),
      .flush(1'b0),
      .d    (xi),
      .w    (wi),
      .cells(cells[i])
    );
  end

  assign w0     = g_s[0].wi;
  assign result = cells[0];

endmodule
