// rsu_top: the shifter-sorter designs side by side.
//
//  * u_rsu: the complete rapid sorting unit (two 127-cell shifter sorters
//    with X buffers in linear composition, 256 x 96-bit reference RAM),
//    taking two (32-bit score, 96-bit reference) pairs per clock and
//    returning the 127 best pairs after a flush. Ports rsu_*.
//  * u_lin: the generic linear composition of K shifter sorters with the
//    infinity-driven collapse timed by a 0..N(K-1) counter. Ports lin_*.
//  * u_tree: the generic binary-tree composition of K shifter sorters,
//    collapsed in log2(K) rounds timed by a 0..N*log2(K) counter. Ports
//    tree_*.
//
// The three share only clock and reset. Their timing is described in
// rsu.sv, linear_sorter.sv and tree_sorter.sv. Defaults: RSU with 127 cells
// per sorter, 32-bit scores, 96-bit references; compositions with K = 4
// sorters of N = 128 cells of 32-bit scores.
module rsu_top #(
  parameter int unsigned RSU_N  = rsu_pkg::RSU_CELLS,
  parameter int unsigned SW     = rsu_pkg::SCORE_W,
  parameter int unsigned RW     = rsu_pkg::REF_W,
  parameter int unsigned GEN_K  = rsu_pkg::GEN_K,
  parameter int unsigned GEN_N  = rsu_pkg::GEN_CELLS
) (
  input  logic          clk,
  input  logic          rst_n,
  // complete RSU
  input  logic [1:0]    rsu_in_valid,
  input  logic [SW-1:0] rsu_in_score [2],
  input  logic [RW-1:0] rsu_in_data  [2],
  output logic          rsu_in_ready,
  input  logic          rsu_flush_start,
  output logic          rsu_out_valid,
  output logic [SW-1:0] rsu_out_score,
  output logic [RW-1:0] rsu_out_data,
  output logic          rsu_done,
  // linear composition
  input  logic          lin_clr,
  input  logic          lin_idle,
  input  logic          lin_in_valid,
  input  logic [SW-1:0] lin_d [GEN_K],
  output logic          lin_data_ready,
  output logic [SW-1:0] lin_w0,
  output logic [SW-1:0] lin_result [GEN_N],
  // tree composition
  input  logic          tree_clr,
  input  logic          tree_idle,
  input  logic          tree_in_valid,
  input  logic [SW-1:0] tree_d [GEN_K],
  output logic          tree_data_ready,
  output logic [SW-1:0] tree_w0,
  output logic [SW-1:0] tree_result [GEN_N]
);

  rsu #(.N(RSU_N), .SW(SW), .RW(RW)) u_rsu (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (rsu_in_valid),
    .in_score   (rsu_in_score),
    .in_data    (rsu_in_data),
    .in_ready   (rsu_in_ready),
    .flush_start(rsu_flush_start),
    .out_valid  (rsu_out_valid),
    .out_score  (rsu_out_score),
    .out_data   (rsu_out_data),
    .done       (rsu_done)
  );

  linear_sorter #(.K(GEN_K), .N(GEN_N), .DW(SW)) u_lin (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (lin_clr),
    .idle      (lin_idle),
    .in_valid  (lin_in_valid),
    .d         (lin_d),
    .data_ready(lin_data_ready),
    .w0        (lin_w0),
    .result    (lin_result)
  );

  tree_sorter #(.K(GEN_K), .N(GEN_N), .DW(SW)) u_tree (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (tree_clr),
    .idle      (tree_idle),
    .in_valid  (tree_in_valid),
    .d         (tree_d),
    .data_ready(tree_data_ready),
    .w0        (tree_w0),
    .result    (tree_result)
  );

endmodule
