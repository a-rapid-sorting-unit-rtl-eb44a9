// shifter_sorter: linear array of N processing elements forming an
// insertion-sort priority queue that keeps the N highest keys seen.
//
// Cell 0 holds the lowest key, cell N-1 the highest (R_0 <= ... <= R_{N-1}).
// Each enabled clock one word D is inserted: cells below the insertion
// point shift left, the insertion cell takes D, the cells above hold, and
// the lowest word of {cells, D} leaves on `w` (W in the paper). The array
// needs no control; connectivity is local except for the broadcast of D.
// This structure follows the paper.
//
// With `flush` high every cell shifts left whatever the keys: R_0 leaves on
// `w` and D enters cell N-1 (forced-shift mode of the complete RSU).
// `clr` reloads every cell with its reset value. Reset values are
// RST_BASE + i*RST_STEP for cell i, so a caller can preload distinct
// low-order fields (used for the RSU memory addresses); the default is all
// zero, the lowest score. `w` and `cells` are combinational/registered
// outputs respectively; one insertion per clock.
module shifter_sorter #(
  parameter int unsigned   N        = 8,
  parameter int unsigned   DW       = 32,
  parameter int unsigned   KW       = DW,
  parameter logic [DW-1:0] RST_BASE = '0,
  parameter logic [DW-1:0] RST_STEP = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          clr,
  input  logic          flush,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] w,
  output logic [DW-1:0] cells [N]
);

  // chain[i] is D_i: word offered by PE i to PE i-1; chain[N] = D.
  logic [DW-1:0] chain [N+1];

  assign chain[N] = d;
  assign w        = chain[0];

  for (genvar i = 0; i < N; i++) begin : g_pe
    ss_pe #(
      .DW     (DW),
      .KW     (KW),
      .RST_VAL(DW'(RST_BASE + DW'(i) * RST_STEP))
    ) u_pe (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (en),
      .clr    (clr),
      .flush  (flush),
      .d      (d),
      .d_right(chain[i+1]),
      .d_left (chain[i]),
      .r      (cells[i])
    );
  end

endmodule
