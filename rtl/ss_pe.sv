// ss_pe: one processing element of a shifter sorter (programmable shifting
// register file used as a priority queue).
//
// The PE holds one word R_i. Its comparator forms p_i = (key(R_i) >= key(D)),
// where D is the word being inserted, broadcast to every PE. A 2-to-1 mux
// passes D_i = p_i ? D : R_i to the left neighbour, and the register loads
// the word offered by the right neighbour (D_{i+1}) when p_i is low,
// otherwise it holds:
//     R_i+ = p_i R_i + !p_i D_{i+1},   D_i = p_i D + !p_i R_i
// The rightmost PE of an array receives D itself as D_{i+1} (p_n = 1).
// These equations, the comparator, the mux and the load-on-!p_i register
// follow the paper.
//
// Additions of this design: `flush` forces p_i low so the whole array
// shifts left by one word (the forced-shift mode of the complete RSU);
// `en` gates the register (no new word this cycle); `clr` reloads RST_VAL
// synchronously; rst_n loads RST_VAL asynchronously. The key is the KW most
// significant bits of the word; the remaining bits ride along (for the RSU,
// the internal memory address). Timing: one word per clock, the register
// updates at the rising edge; d_left is combinational.
module ss_pe #(
  parameter int unsigned  DW      = 32,
  parameter int unsigned  KW      = DW,
  parameter logic [DW-1:0] RST_VAL = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,       // accept the broadcast word this cycle
  input  logic          clr,      // synchronous reload of RST_VAL
  input  logic          flush,    // force a left shift
  input  logic [DW-1:0] d,        // broadcast word D
  input  logic [DW-1:0] d_right,  // D_{i+1} from the right neighbour
  output logic [DW-1:0] d_left,   // D_i to the left neighbour
  output logic [DW-1:0] r         // register R_i
);

  logic p;

  always_comb begin
    p      = !flush && (r[DW-1 -: KW] >= d[DW-1 -: KW]);
    d_left = p ? d : r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      r <= RST_VAL;
    else if (clr)    r <= RST_VAL;
    else if (en && !p) r <= d_right;
  end

endmodule
