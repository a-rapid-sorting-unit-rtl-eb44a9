// rsu_dpram: dual-port RAM holding the datum references of the RSU
// (DEPTH words of DW bits, 256 x 96 by default).
//
// Port 0 (MAR_0/MB_0) writes or reads; port 1 (MAR_1/MB_1) writes only, as
// the RSU needs: during sorting both ports write the references of the two
// input lanes, during the final flush port 0 reads the results out. Both
// ports are synchronous: a write takes effect at the clock edge, and read
// data appear in MB_0 (rdata0) one clock after read0 is sampled. The two
// ports never write the same address in the RSU; if they did, port 1 wins.
// Size and port use follow the paper; the synchronous read is this
// design's choice. The contents are not reset.
module rsu_dpram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DW    = rsu_pkg::REF_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr0,   // MAR_0
  input  logic          write0,
  input  logic          read0,
  input  logic [DW-1:0] wdata0,
  output logic [DW-1:0] rdata0,  // MB_0
  input  logic [AW-1:0] addr1,   // MAR_1
  input  logic          write1,
  input  logic [DW-1:0] wdata1
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (write0) mem[addr0] <= wdata0;
    if (write1) mem[addr1] <= wdata1;
    if (read0)  rdata0     <= mem[addr0];
  end

endmodule
