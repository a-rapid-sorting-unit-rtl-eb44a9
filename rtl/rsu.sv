// rsu: complete rapid sorting unit. Two shifter sorters in linear
// composition keep the best scores of an unbounded stream of (score,
// datum-reference) pairs arriving two per clock; the references live in a
// dual-port RAM and only the scores (with their RAM addresses) move
// through the sorters.
//
// Each sorter has N cells plus an X buffer, i.e. N+1 positions, each owning
// one RAM address (0..N for the left sorter, N+1..2N+1 for the right one,
// given at reset). X always holds the entry that was last dropped, so its
// address is free: an incoming pair has its reference written at X's
// address (MAR_0 / MAR_1) and its score inserted tagged with that same
// address. Whichever entry is then dropped moves into X and frees its
// address in turn. No reference is ever moved.
//
// After flush_start, stage 1 flushes the right sorter, lowest first, into
// the left sorter through the par/serial mux (serial); stage 2 flushes the
// left sorter out of its X buffer, and port 0 of the RAM reads each
// reference. out_valid then marks N results, lowest of the N best first,
// one per clock, each score beside its reference. Flushing shifts in zero
// scores, so the sorters end empty (all zero) and the next search needs no
// reset; while flushing, the address leaving the left X buffer is
// recycled into the right sorter's input so every address stays owned by
// exactly one position.
//
// Timing: in_ready is high in the sort phase; flush_start to done takes
// 2(N+1) clocks; out_valid lags the RAM read by one clock (synchronous RAM).
// The organisation (cells, X buffers, address tags, DPRAM, par/serial mux,
// sort/flush modes, two stages of N+1 shifts, zero scores while flushing)
// follows the paper. The handshake signals, the synchronous RAM read,
// and the address recycling during the flush are this design's choices.
module rsu #(
  parameter int unsigned N  = rsu_pkg::RSU_CELLS,
  parameter int unsigned SW = rsu_pkg::SCORE_W,
  parameter int unsigned RW = rsu_pkg::REF_W,
  localparam int unsigned AW = $clog2(2 * (N + 1))
) (
  input  logic          clk,
  input  logic          rst_n,
  // input lanes: 0 feeds the left sorter, 1 the right sorter
  input  logic [1:0]    in_valid,
  input  logic [SW-1:0] in_score [2],
  input  logic [RW-1:0] in_data  [2],
  output logic          in_ready,
  input  logic          flush_start,
  output logic          out_valid,
  output logic [SW-1:0] out_score,
  output logic [RW-1:0] out_data,
  output logic          done
);

  typedef struct packed {
    logic [SW-1:0] score;
    logic [AW-1:0] addr;
  } entry_t;

  entry_t xl, xr, dl, dr;
  logic   serial, flush_l, flush_r, en_l, en_r, write0, write1, read0;
  logic [SW+AW-1:0] cells_l [N];
  logic [SW+AW-1:0] cells_r [N];
  rsu_pkg::rsu_phase_e phase;

  rsu_ctrl #(.N(N)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .flush_start(flush_start),
    .in_valid   (in_valid),
    .phase      (phase),
    .in_ready   (in_ready),
    .serial     (serial),
    .flush_l    (flush_l),
    .flush_r    (flush_r),
    .en_l       (en_l),
    .en_r       (en_r),
    .write0     (write0),
    .write1     (write1),
    .read0      (read0),
    .done       (done)
  );

  // par/serial mux of the left sorter; right sorter input with zero score
  // while flushing.
  always_comb begin
    dl = serial ? xr : entry_t'{score: in_score[0], addr: xl.addr};
    dr = flush_r ? entry_t'{score: '0, addr: xl.addr}
                 : entry_t'{score: in_score[1], addr: xr.addr};
  end

  rsu_sorter_unit #(.N(N), .SW(SW), .AW(AW), .ADDR_BASE(AW'(0))) u_left (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en_l),
    .flush(flush_l),
    .d    (dl),
    .x_q  (xl),
    .cells(cells_l)
  );

  rsu_sorter_unit #(.N(N), .SW(SW), .AW(AW), .ADDR_BASE(AW'(N + 1))) u_right (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en_r),
    .flush(flush_r),
    .d    (dr),
    .x_q  (xr),
    .cells(cells_r)
  );

  rsu_dpram #(.DEPTH(2 * (N + 1)), .DW(RW)) u_ram (
    .clk   (clk),
    .addr0 (xl.addr),
    .write0(write0),
    .read0 (read0),
    .wdata0(in_data[0]),
    .rdata0(out_data),
    .addr1 (xr.addr),
    .write1(write1),
    .wdata1(in_data[1])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_score <= '0;
    end else begin
      out_valid <= read0;
      if (read0) out_score <= xl.score;
    end
  end

  // The left and right X buffers never name the same RAM slot.
  a_addr_distinct: assert property (@(posedge clk) disable iff (!rst_n)
    xl.addr != xr.addr);

endmodule
