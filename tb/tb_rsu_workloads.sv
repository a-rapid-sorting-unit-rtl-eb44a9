// tb_rsu_workloads: runs the search workloads of the RSU example sizes on
// the complete RSU with 32-bit scores and 96-bit references: the default
// 127 cells per sorter (best 127), 128 cells (best 128) and 256 cells
// (best 256), each over a stream of 3000 pairs. Each search is checked by
// rsu_search_runner; the counts are summed here.
module tb_rsu_workloads;
  logic clk = 0, rst_n = 1;
  int   checks, failures;
  int   c [3], f [3];
  logic fin [3];

  always #5 clk = ~clk;

  rsu_search_runner #(.N(127), .PAIRS(3000)) u_127 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  rsu_search_runner #(.N(128), .PAIRS(3000)) u_128 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  rsu_search_runner #(.N(256), .PAIRS(3000)) u_256 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(fin[2]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1 rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    checks   = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    for (int i = 0; i < 3; i++) if (c[i] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
