// rsu_ctrl: sequencer of the complete RSU.
//
// Sort phase (PH_SORT): the par/serial mux is set to "par", both sorters
// are in "sort" mode and each one inserts its own input lane when that
// lane is valid, while the lane's datum reference is written to the RAM
// (write0/write1). A flush_start pulse ends the stream. Flush stage 1
// (PH_FLUSH1, N+1 clocks): the mux is set to "serial" and only the right
// sorter is in "flush", so its N cells and its X buffer move, lowest
// first, into the left sorter, which keeps the N best. Flush stage 2
// (PH_FLUSH2, N+1 clocks): both sorters flush, the left sorter's words come
// out of its X buffer one per clock and read0 fetches their references;
// the first word of this stage is the stale X content and is skipped, so
// read0 is high for the last N clocks. `done` pulses on the last clock of
// stage 2 and the unit is back in the sort phase, ready for a new search.
// The two flush stages of N+1 = 128 shifts, the par/serial and sort/flush
// settings and read0 follow the paper; the flush_start handshake, lane
// valids and in_ready are this design's.
module rsu_ctrl #(
  parameter int unsigned N  = rsu_pkg::RSU_CELLS,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                flush_start,
  input  logic [1:0]          in_valid,
  output rsu_pkg::rsu_phase_e phase,
  output logic                in_ready,
  output logic                serial,    // par/serial mux: 1 = serial
  output logic                flush_l,   // sort/flush of the left sorter
  output logic                flush_r,   // sort/flush of the right sorter
  output logic                en_l,
  output logic                en_r,
  output logic                write0,
  output logic                write1,
  output logic                read0,
  output logic                done
);

  import rsu_pkg::*;

  logic [CW-1:0] cnt;
  logic          last;

  assign last = (cnt == CW'(N));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_SORT;
      cnt   <= '0;
    end else begin
      unique case (phase)
        PH_SORT: begin
          cnt <= '0;
          if (flush_start) phase <= PH_FLUSH1;
        end
        PH_FLUSH1: begin
          cnt <= last ? '0 : cnt + 1'b1;
          if (last) phase <= PH_FLUSH2;
        end
        PH_FLUSH2: begin
          cnt <= last ? '0 : cnt + 1'b1;
          if (last) phase <= PH_SORT;
        end
        default: phase <= PH_SORT;
      endcase
    end
  end

  always_comb begin
    in_ready = (phase == PH_SORT);
    serial   = (phase != PH_SORT);
    flush_r  = (phase != PH_SORT);
    flush_l  = (phase == PH_FLUSH2);
    en_l     = in_ready ? in_valid[0] : 1'b1;
    en_r     = in_ready ? in_valid[1] : 1'b1;
    write0   = in_ready && in_valid[0];
    write1   = in_ready && in_valid[1];
    read0    = (phase == PH_FLUSH2) && (cnt != '0);
    done     = (phase == PH_FLUSH2) && last;
  end

endmodule
