// tb_rsu: end-to-end test of the complete rapid sorting unit at a reduced
// size (N = 7 cells per sorter, 16-bit scores, 24-bit references).
// Several searches run back to back without reset. In each, random
// (score, reference) pairs arrive on both lanes with random gaps; scores
// are distinct within a search so every result has one right reference.
// After flush_start the unit must answer with exactly N results on
// consecutive out_valid clocks, ascending, equal to the N best scores of
// the search (zero scores fill in when fewer than N arrived), each with
// the reference that arrived with it; done must come 2(N+1) clocks after
// flush_start. At every clock the 2(N+1) address tags held by the cells
// and X buffers must be all different.
module tb_rsu;
  localparam int unsigned N  = 7;
  localparam int unsigned SW = 16;
  localparam int unsigned RW = 24;
  localparam int unsigned AW = $clog2(2 * (N + 1));

  logic clk = 0, rst_n = 1, flush_start = 0;
  logic [1:0] in_valid = '0;
  logic [SW-1:0] in_score [2];
  logic [RW-1:0] in_data [2];
  logic in_ready, out_valid, done;
  logic [SW-1:0] out_score;
  logic [RW-1:0] out_data;
  int checks = 0, failures = 0;

  rsu #(.N(N), .SW(SW), .RW(RW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // address tags must stay a permutation of 0..2N+1
  always @(negedge clk) if (rst_n) begin
    bit used [2*(N+1)];
    bit ok;
    ok = 1;
    for (int a = 0; a < 2 * (N + 1); a++) used[a] = 0;
    used[dut.xl.addr] = 1;
    if (used[dut.xr.addr]) ok = 0;
    used[dut.xr.addr] = 1;
    for (int i = 0; i < N; i++) begin
      if (used[dut.cells_l[i][AW-1:0]]) ok = 0;
      used[dut.cells_l[i][AW-1:0]] = 1;
      if (used[dut.cells_r[i][AW-1:0]]) ok = 0;
      used[dut.cells_r[i][AW-1:0]] = 1;
    end
    check(ok, "address tags distinct");
  end

  logic [RW-1:0] ref_of [logic [SW-1:0]];
  logic [SW-1:0] scores [$];

  task automatic search(int pairs, int max_score);
    int sent = 0, cyc, outs;
    logic [SW-1:0] s;
    ref_of.delete();
    scores.delete();
    while (sent < pairs) begin
      @(negedge clk);
      in_valid = '0;
      for (int l = 0; l < 2; l++) begin
        if (sent < pairs && $urandom_range(0, 3) != 0) begin
          do s = SW'($urandom_range(1, max_score)); while (ref_of.exists(s));
          in_score[l] = s;
          in_data[l]  = RW'($urandom);
          ref_of[s]   = in_data[l];
          scores.push_back(s);
          in_valid[l] = 1;
          sent++;
        end
      end
      #1 check(in_ready, "ready while sorting");
    end
    @(negedge clk);
    in_valid    = '0;
    flush_start = 1;
    @(negedge clk);
    flush_start = 0;
    in_valid    = 2'b11;  // must be ignored while flushing
    in_score[0] = '1;
    in_score[1] = '1;
    for (int i = 0; i < N; i++) scores.push_back('0);
    scores.sort();
    cyc = 2;  // the first flush clock began at the previous edge
    outs = 0;
    while (outs < N + 2 && cyc < 10 * N) begin
      @(posedge clk); #1;
      if (done) begin
        check(cyc == 2 * (N + 1), "flush latency");
        in_valid = '0;  // the next clock is a sort clock again
      end
      if (out_valid) begin
        s = scores[scores.size() - N + outs];
        check(out_score == s, "result score");
        if (out_score != s) $display("  out %0d: %0d expected %0d", outs, out_score, s);
        if (s != 0) check(out_data == ref_of[s], "result reference");
        outs++;
      end else if (outs > 0) begin
        break;
      end
      cyc++;
    end
    check(outs == N, "N results");
    @(negedge clk) in_valid = '0;
  endtask

  initial begin
    in_score[0] = '0; in_score[1] = '0; in_data[0] = '0; in_data[1] = '0;
    #1 rst_n = 0;
    #1 rst_n = 1;
    search(60, 60000);
    search(40, 65535);
    search(4, 1000);     // fewer pairs than cells
    search(100, 500);    // many rejects
    search(2 * (N + 1), 65535);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
