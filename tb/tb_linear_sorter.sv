// tb_linear_sorter: self-checking test of the linear composition of K=4
// shifter sorters. Random bursts (with gaps in in_valid) feed all K lanes;
// then idle is raised and the collapse is timed by the 0..N(K-1) counter: data_ready must rise exactly N(K-1) clocks after idle. S_0 must then hold the N highest scores of everything
// entered since the last clear (initial zeros included), ascending. A
// second burst checks that the other sorters were emptied and S_0 keeps
// the running best N; holding idle checks that results stay put; clr
// empties everything.
module tb_linear_sorter;
  localparam int unsigned K  = 4;
  localparam int unsigned N  = 8;
  localparam int unsigned DW = 16;
  localparam int unsigned LAT = N * (K - 1);

  logic clk = 0, rst_n = 1, clr = 0, idle = 0, in_valid = 0;
  logic [DW-1:0] d [K];
  logic data_ready;
  logic [DW-1:0] w0;
  logic [DW-1:0] result [N];
  int checks = 0, failures = 0;
  logic [DW-1:0] seen [$];

  linear_sorter #(.K(K), .N(N), .DW(DW)) dut (.*);

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

  task automatic clear_model();
    seen.delete();
    for (int i = 0; i < N; i++) seen.push_back('0);
  endtask

  task automatic burst(int cycles, int max_score);
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      idle     = 0;
      in_valid = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < K; i++) begin
        d[i] = DW'($urandom_range(1, max_score));
        if (in_valid) seen.push_back(d[i]);
      end
    end
    @(negedge clk) in_valid = 0;
  endtask

  task automatic collapse_and_check(string tag);
    int cyc;
    logic [DW-1:0] s [$];
    @(negedge clk) idle = 1;
    cyc = 0;
    do begin
      @(posedge clk); #1;
      cyc++;
    end while (!data_ready && cyc < 10 * LAT);
    check(cyc == LAT, {tag, ": collapse latency"});
    if (cyc != LAT) $display("  latency %0d, expected %0d", cyc, LAT);
    s = seen;
    s.sort();
    for (int i = 0; i < N; i++)
      check(result[i] == s[s.size() - N + i], {tag, ": result"});
    // hold idle: results must not move
    repeat (5) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++)
      check(result[i] == s[s.size() - N + i], {tag, ": result held"});
  endtask

  initial begin
    #1 rst_n = 0;
    for (int i = 0; i < K; i++) d[i] = '0;
    clear_model();
    repeat (2) @(negedge clk);
    rst_n = 1;
    burst(30, 60000);
    collapse_and_check("first");
    burst(25, 65534);
    collapse_and_check("second");
    // few inputs of low score: best N must be unchanged except where larger
    burst(3, 200);
    collapse_and_check("third");
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    clear_model();
    #1;
    for (int i = 0; i < N; i++) check(result[i] == '0, "clr empties S_0");
    burst(20, 65534);
    collapse_and_check("after clr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
