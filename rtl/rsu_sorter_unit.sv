// rsu_sorter_unit: one shifter sorter of the complete RSU, N cells of
// (score + internal address) bits, followed by the X buffer register.
//
// Each cell holds a score (key, upper SW bits) and the internal memory
// address (lower AW bits) where that score's datum reference is stored.
// X buffers the word shifted out of the register file on each enabled
// clock, so X always names the one address of this unit whose entry has
// been dropped: the RSU writes the next incoming reference there and
// inserts the incoming score tagged with that address. In `flush` mode the
// file shifts left by one word whatever the scores (cell 0 goes to X, the
// input word enters cell N-1). Reset gives every position a distinct
// address: X gets ADDR_BASE and cell i gets ADDR_BASE + 1 + i, all scores
// zero. The cell/X organisation, the forced-shift mode and the distinct
// initial addresses follow the paper; the reset polarity is this
// design's. One word per enabled clock; x_q is registered.
module rsu_sorter_unit #(
  parameter int unsigned    N         = rsu_pkg::RSU_CELLS,
  parameter int unsigned    SW        = rsu_pkg::SCORE_W,
  parameter int unsigned    AW        = 8,
  parameter logic [AW-1:0]  ADDR_BASE = '0,
  localparam int unsigned   DW        = SW + AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,      // insert / shift this clock
  input  logic          flush,   // 1: forced shift ("flush"), 0: "sort"
  input  logic [DW-1:0] d,       // {score, address} entering the file
  output logic [DW-1:0] x_q,     // X buffer
  output logic [DW-1:0] cells [N]
);

  logic [DW-1:0] w;

  shifter_sorter #(
    .N       (N),
    .DW      (DW),
    .KW      (SW),
    .RST_BASE(DW'(ADDR_BASE) + DW'(1)),
    .RST_STEP(DW'(1))
  ) u_ss (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .clr  (1'b0),
    .flush(flush),
    .d    (d),
    .w    (w),
    .cells(cells)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  x_q <= DW'(ADDR_BASE);
    else if (en) x_q <= w;
  end

endmodule
