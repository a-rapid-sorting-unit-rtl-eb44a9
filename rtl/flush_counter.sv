// flush_counter: the 0..MAX counter that times the collapse (flush) of a
// composition of shifter sorters.
//
// While `en` (the idle/burst line, high when the input stream has run out)
// is high the counter advances by one per clock until it reaches MAX, where
// it stops and raises `done` (data_ready). `last` marks the final counting
// clock (enabled, count = MAX-1), the clock whose edge raises `done`. When `en` falls, for a new burst,
// the counter returns to 0 on the next clock. MAX is n(k-1) for the linear
// composition and n*log2(k) for the tree composition, as in the paper;
// the return-to-zero on a new burst is this design's choice.
module flush_counter #(
  parameter int unsigned MAX = 384,
  localparam int unsigned CW = $clog2(MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [CW-1:0] count,
  output logic          last,
  output logic          done
);

  assign done = (count == CW'(MAX));
  assign last = en && (count == CW'(MAX - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (!en)    count <= '0;
    else if (!done)  count <= count + 1'b1;
  end

endmodule
