// rsu_search_runner: testbench helper that owns one rsu instance of N
// cells per sorter and runs one search of PAIRS random (score, reference)
// pairs through it, two lanes with random gaps, then flushes it and checks
// that exactly N results come out, ascending, equal to the N best scores
// with their references, and that the flush takes 2(N+1) clocks. It reports
// its counts through its ports and raises `finished` at the end.
module rsu_search_runner #(
  parameter int unsigned N     = 127,
  parameter int unsigned PAIRS = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int unsigned SW = 32;
  localparam int unsigned RW = 96;

  logic [1:0]    in_valid;
  logic [SW-1:0] in_score [2];
  logic [RW-1:0] in_data  [2];
  logic          in_ready, flush_start, out_valid, done;
  logic [SW-1:0] out_score;
  logic [RW-1:0] out_data;

  rsu #(.N(N), .SW(SW), .RW(RW)) dut (.*);

  logic [RW-1:0] ref_of [logic [SW-1:0]];
  logic [SW-1:0] scores [$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL N=%0d %s at %0t", N, what, $time);
    end
  endtask

  initial begin
    int sent = 0, cyc, outs = 0;
    logic [SW-1:0] s;
    checks = 0; failures = 0; finished = 0;
    in_valid = '0; flush_start = 0;
    in_score[0] = '0; in_score[1] = '0; in_data[0] = '0; in_data[1] = '0;
    @(posedge rst_n);
    while (sent < PAIRS) begin
      @(negedge clk);
      in_valid = '0;
      for (int l = 0; l < 2; l++) begin
        if (sent < PAIRS && $urandom_range(0, 4) != 0) begin
          do s = SW'($urandom_range(1, 32'hFFFF_FFFF)); while (ref_of.exists(s));
          in_score[l] = s;
          in_data[l]  = {$urandom, $urandom, $urandom};
          ref_of[s]   = in_data[l];
          scores.push_back(s);
          in_valid[l] = 1;
          sent++;
        end
      end
    end
    @(negedge clk);
    in_valid    = '0;
    flush_start = 1;
    @(negedge clk);
    flush_start = 0;
    for (int i = 0; i < N; i++) scores.push_back('0);
    scores.sort();
    cyc = 2;
    while (outs < N + 2 && cyc < 4 * N + 8) begin
      @(posedge clk); #1;
      if (done) check(cyc == 2 * (N + 1), "flush latency");
      if (out_valid) begin
        s = scores[scores.size() - N + outs];
        check(out_score == s, "result score");
        if (s != 0) check(out_data == ref_of[s], "result reference");
        outs++;
      end else if (outs > 0) begin
        break;
      end
      cyc++;
    end
    check(outs == N, "result count");
    finished = 1;
  end
endmodule
