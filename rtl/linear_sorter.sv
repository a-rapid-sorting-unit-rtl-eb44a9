// linear_sorter: K shifter sorters in linear composition, taking K scores
// per clock and keeping the N highest of the whole stream in sorter S_0.
//
// Burst (idle = 0): sorter S_i inserts input lane i (x_i = d_i) whenever
// in_valid is high. Idle (idle = 1): the stream has run out and the
// composition collapses into S_0. Each sorter S_i (i < K-1) inserts the word
// shifted out of its successor, x_i = W_{i+1}, while the last one, S_{K-1},
// inserts "infinity" (all ones), which pushes its whole content out. A
// 0..N(K-1) counter enabled by the idle line times this, and after N(K-1)
// clocks raises data_ready; S_0 then holds the N highest scores of the
// whole stream, ascending in `result` (result[N-1] is the best). The mux
// structure, the infinity input and the counter length follow the paper.
//
// Choices of this design: in_valid gates insertion during a burst; all
// sorters hold once data_ready is up; and on the final collapse clock
// sorters S_1..S_{K-1}, which would be left full of infinity, load zero
// instead, so that a new burst can start at once, S_0 keeping the running
// top N across bursts. idle must stay high until data_ready rises.
// `clr` clears everything (start of a new search). The W chain is
// combinational through all K sorters during the collapse.
module linear_sorter #(
  parameter int unsigned K  = rsu_pkg::GEN_K,
  parameter int unsigned N  = rsu_pkg::GEN_CELLS,
  parameter int unsigned DW = rsu_pkg::SCORE_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          idle,        // 1: input data over, collapse
  input  logic          in_valid,
  input  logic [DW-1:0] d [K],
  output logic          data_ready,
  output logic [DW-1:0] w0,          // word shifted out of S_0
  output logic [DW-1:0] result [N]
);

  localparam logic [DW-1:0] INF = '1;

  logic [DW-1:0] x [K];
  logic [DW-1:0] w [K];
  logic [DW-1:0] cells [K][N];
  logic          en;
  logic          last;  // final collapse clock
  logic [$clog2(N * (K - 1) + 1)-1:0] count;  // observed through data_ready only

  flush_counter #(.MAX(N * (K - 1))) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (idle),
    .count(count),
    .last (last),
    .done (data_ready)
  );

  assign en = idle ? !data_ready : in_valid;

  for (genvar i = 0; i < K; i++) begin : g_s
    if (i == K - 1) begin : g_last
      assign x[i] = idle ? INF : d[i];
    end else begin : g_mid
      assign x[i] = idle ? w[i+1] : d[i];
    end

    shifter_sorter #(.N(N), .DW(DW)) u_s (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .clr  (clr || (i != 0 && last)),
      .flush(1'b0),
      .d    (x[i]),
      .w    (w[i]),
      .cells(cells[i])
    );
  end

  assign w0     = w[0];
  assign result = cells[0];

endmodule
