// rsu_pkg: constants and types shared by the rapid sorting unit (RSU).
//
// The defaults are the sizes of the complete RSU example: 32-bit scores,
// 96-bit datum references (128-bit input words), shifter sorters of 127
// cells plus one X buffer each, two sorters, hence 256 reference slots and
// 8-bit internal memory addresses. The generic compositions (linear and
// tree) default to k = 4 sorters of n = 128 cells, the sizes used in their
// description. The controller state encoding is this design's own choice.
package rsu_pkg;

  localparam int unsigned SCORE_W   = 32;   // score width
  localparam int unsigned REF_W     = 96;   // datum-reference width
  localparam int unsigned RSU_CELLS = 127;  // cells per RSU shifter sorter (X excluded)
  localparam int unsigned GEN_CELLS = 128;  // cells per sorter of the generic compositions
  localparam int unsigned GEN_K     = 4;    // sorters in the generic compositions

  // RSU sequencing phases: accept scores, flush the right sorter into the
  // left one, then flush the left sorter to the output ports.
  typedef enum logic [1:0] {
    PH_SORT   = 2'd0,
    PH_FLUSH1 = 2'd1,
    PH_FLUSH2 = 2'd2
  } rsu_phase_e;

endpackage
