// tb_rsu_top_full: end-to-end test of rsu_top with every parameter at its default (127-cell RSU sorters, 256 x 96-bit RAM, 4 composition sorters of 128 cells).
// The three designs run concurrently. The RSU receives 1 search(es)
// of random (score, reference) pairs on both lanes, back to back without
// reset; each must return exactly RSU_N results, ascending, equal to the
// RSU_N best scores with their references, with done 2(RSU_N+1) clocks
// after the flush starts. The linear and tree compositions receive
// 1 burst(s) each; after idle, data_ready must rise after exactly
// GEN_N(GEN_K-1) and GEN_N*log2(GEN_K) clocks, and S_0 must hold the GEN_N
// best scores seen since the last clear. The test counts how often each
// mechanism happened (lane gaps, rejected pairs, flush stages, inputs
// ignored while flushing, collapse rounds, results kept across bursts)
// and fails if one never did.
module tb_rsu_top_full;
  localparam int unsigned RSU_N = 127;
  localparam int unsigned GEN_N = 128;
  localparam int unsigned GEN_K = 4;
  localparam int unsigned SW    = 32;
  localparam int unsigned RW    = 96;
  localparam logic [SW-1:0] MAXS = 32'hFFFF_FFFE;  // all ones is "infinity"

  logic clk = 0, rst_n = 1;
  logic [1:0]    rsu_in_valid = '0;
  logic [SW-1:0] rsu_in_score [2];
  logic [RW-1:0] rsu_in_data  [2];
  logic          rsu_in_ready, rsu_flush_start = 0, rsu_out_valid, rsu_done;
  logic [SW-1:0] rsu_out_score;
  logic [RW-1:0] rsu_out_data;
  logic          lin_clr = 0, lin_idle = 0, lin_in_valid = 0, lin_data_ready;
  logic [SW-1:0] lin_d [GEN_K];
  logic [SW-1:0] lin_w0;
  logic [SW-1:0] lin_result [GEN_N];
  logic          tree_clr = 0, tree_idle = 0, tree_in_valid = 0, tree_data_ready;
  logic [SW-1:0] tree_d [GEN_K];
  logic [SW-1:0] tree_w0;
  logic [SW-1:0] tree_result [GEN_N];

  int checks = 0, failures = 0;
  // mechanism counters
  int n_rsu_pairs = 0, n_rsu_gaps = 0, n_rsu_rejects = 0, n_rsu_flush1 = 0;
  int n_rsu_flush2 = 0, n_rsu_ignored = 0, n_rsu_searches = 0;
  int n_lin_gaps = 0, n_lin_collapses = 0, n_lin_kept = 0;
  int n_tree_gaps = 0, n_tree_collapses = 0, n_tree_rounds = 0, n_tree_kept = 0;

  rsu_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- complete RSU ----------------
  logic [RW-1:0] ref_of [logic [SW-1:0]];
  logic [SW-1:0] rsu_scores [$];

  task automatic rsu_search(int pairs);
    int sent = 0, cyc, outs;
    logic [SW-1:0] s;
    logic [SW-1:0] xs [2];
    ref_of.delete();
    rsu_scores.delete();
    while (sent < pairs) begin
      @(negedge clk);
      rsu_in_valid = '0;
      for (int l = 0; l < 2; l++) begin
        if (sent < pairs && $urandom_range(0, 4) != 0) begin
          do s = SW'($urandom_range(1, 32'hFFFF_FFF0)); while (ref_of.exists(s));
          rsu_in_score[l] = s;
          rsu_in_data[l]  = {$urandom, $urandom, $urandom};
          ref_of[s]       = rsu_in_data[l];
          rsu_scores.push_back(s);
          rsu_in_valid[l] = 1;
          sent++;
          n_rsu_pairs++;
        end else begin
          n_rsu_gaps++;
        end
      end
      @(posedge clk); #1;
      // a pair whose score lands straight in the X buffer was rejected
      xs[0] = dut.u_rsu.xl.score;
      xs[1] = dut.u_rsu.xr.score;
      for (int l = 0; l < 2; l++)
        if (rsu_in_valid[l] && xs[l] == rsu_in_score[l]) n_rsu_rejects++;
    end
    @(negedge clk);
    rsu_in_valid    = '0;
    rsu_flush_start = 1;
    @(negedge clk);
    rsu_flush_start = 0;
    rsu_in_valid    = 2'b11;   // ignored while flushing
    rsu_in_score[0] = MAXS;
    rsu_in_score[1] = MAXS;
    for (int i = 0; i < RSU_N; i++) rsu_scores.push_back('0);
    rsu_scores.sort();
    cyc  = 2;
    outs = 0;
    while (outs < RSU_N + 2 && cyc < 10 * RSU_N) begin
      @(posedge clk); #1;
      if (!rsu_in_ready) n_rsu_ignored++;
      if (dut.u_rsu.flush_r && !dut.u_rsu.flush_l) n_rsu_flush1++;
      if (dut.u_rsu.flush_l) n_rsu_flush2++;
      if (rsu_done) begin
        check(cyc == 2 * (RSU_N + 1), "rsu flush latency");
        rsu_in_valid = '0;
      end
      if (rsu_out_valid) begin
        s = rsu_scores[rsu_scores.size() - RSU_N + outs];
        check(rsu_out_score == s, "rsu result score");
        if (s != 0) check(rsu_out_data == ref_of[s], "rsu result reference");
        outs++;
      end else if (outs > 0) begin
        break;
      end
      cyc++;
    end
    check(outs == RSU_N, "rsu result count");
    n_rsu_searches++;
  endtask

  // ---------------- linear and tree compositions ----------------
  logic [SW-1:0] lin_seen [$];
  logic [SW-1:0] tree_seen [$];

  task automatic gen_burst(bit is_tree, int cycles);
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      if (is_tree) begin
        tree_idle     = 0;
        tree_in_valid = ($urandom_range(0, 3) != 0);
        if (!tree_in_valid) n_tree_gaps++;
        for (int i = 0; i < GEN_K; i++) begin
          tree_d[i] = SW'($urandom_range(1, MAXS));
          if (tree_in_valid) tree_seen.push_back(tree_d[i]);
        end
      end else begin
        lin_idle     = 0;
        lin_in_valid = ($urandom_range(0, 3) != 0);
        if (!lin_in_valid) n_lin_gaps++;
        for (int i = 0; i < GEN_K; i++) begin
          lin_d[i] = SW'($urandom_range(1, MAXS));
          if (lin_in_valid) lin_seen.push_back(lin_d[i]);
        end
      end
    end
    @(negedge clk);
    if (is_tree) tree_in_valid = 0; else lin_in_valid = 0;
  endtask

  task automatic gen_collapse(bit is_tree);
    int cyc = 0, lat, prev_round;
    logic [SW-1:0] s [$];
    logic [SW-1:0] best_before;
    lat = is_tree ? GEN_N * $clog2(GEN_K) : GEN_N * (GEN_K - 1);
    best_before = is_tree ? tree_result[GEN_N-1] : lin_result[GEN_N-1];
    @(negedge clk);
    if (is_tree) tree_idle = 1; else lin_idle = 1;
    prev_round = 0;
    do begin
      @(posedge clk); #1;
      cyc++;
      if (is_tree && dut.u_tree.round != prev_round) begin
        n_tree_rounds++;
        prev_round = dut.u_tree.round;
      end
    end while (!(is_tree ? tree_data_ready : lin_data_ready) && cyc < 4 * lat);
    check(cyc == lat, is_tree ? "tree collapse latency" : "linear collapse latency");
    s = is_tree ? tree_seen : lin_seen;
    s.sort();
    for (int i = 0; i < GEN_N; i++)
      check((is_tree ? tree_result[i] : lin_result[i]) == s[s.size() - GEN_N + i],
            is_tree ? "tree result" : "linear result");
    // a previous best that is still the best was kept across bursts
    if (best_before != 0 && best_before == s[s.size() - 1]) begin
      if (is_tree) n_tree_kept++; else n_lin_kept++;
    end
    if (is_tree) n_tree_collapses++; else n_lin_collapses++;
  endtask

  initial begin
    for (int i = 0; i < GEN_K; i++) begin lin_d[i] = '0; tree_d[i] = '0; end
    rsu_in_score[0] = '0; rsu_in_score[1] = '0;
    rsu_in_data[0]  = '0; rsu_in_data[1]  = '0;
    for (int i = 0; i < GEN_N; i++) begin lin_seen.push_back('0); tree_seen.push_back('0); end
    #1 rst_n = 0;
    #1 rst_n = 1;
    fork
      begin
        for (int r = 0; r < 1; r++) rsu_search(1200);
      end
      begin
        for (int r = 0; r < 1; r++) begin
          gen_burst(0, r == 0 ? 400 : 3);
          gen_collapse(0);
        end
      end
      begin
        for (int r = 0; r < 1; r++) begin
          gen_burst(1, r == 0 ? 400 : 3);
          gen_collapse(1);
        end
      end
    join
    $display("mechanisms: rsu pairs=%0d gaps=%0d rejects=%0d flush1=%0d flush2=%0d ignored=%0d searches=%0d",
             n_rsu_pairs, n_rsu_gaps, n_rsu_rejects, n_rsu_flush1, n_rsu_flush2, n_rsu_ignored, n_rsu_searches);
    $display("mechanisms: linear gaps=%0d collapses=%0d kept=%0d; tree gaps=%0d collapses=%0d round switches=%0d kept=%0d",
             n_lin_gaps, n_lin_collapses, n_lin_kept, n_tree_gaps, n_tree_collapses, n_tree_rounds, n_tree_kept);
    check(n_rsu_pairs > 0,      "mechanism: rsu pairs accepted");
    check(n_rsu_gaps > 0,       "mechanism: rsu lane gaps");
    check(n_rsu_rejects > 0,    "mechanism: rsu rejected pairs");
    check(n_rsu_flush1 > 0,     "mechanism: rsu flush stage 1");
    check(n_rsu_flush2 > 0,     "mechanism: rsu flush stage 2");
    check(n_rsu_ignored > 0,    "mechanism: rsu inputs ignored while flushing");
    check(n_rsu_searches == 1, "mechanism: rsu searches");
    check(n_lin_gaps > 0,       "mechanism: linear burst gaps");
    check(n_lin_collapses == 1, "mechanism: linear collapses");
    check(n_tree_gaps > 0,      "mechanism: tree burst gaps");
    check(n_tree_collapses == 1, "mechanism: tree collapses");
    check(n_tree_rounds >= $clog2(GEN_K) - 1, "mechanism: tree round switches");
    if (1 > 1) begin
      check(n_lin_kept > 0,  "mechanism: linear best kept across bursts");
      check(n_tree_kept > 0, "mechanism: tree best kept across bursts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
