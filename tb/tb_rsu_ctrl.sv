// tb_rsu_ctrl: self-checking test of the RSU sequencer. In the sort phase
// the lane enables and RAM writes must follow the lane valids with the mux
// on "par"; after flush_start, stage 1 must last N+1 clocks with only the
// right sorter flushing and the mux on "serial", stage 2 N+1 clocks with
// both flushing, read0 high on its last N clocks and done on its last one,
// then the sort phase again.
module tb_rsu_ctrl;
  import rsu_pkg::*;
  localparam int unsigned N = 5;

  logic clk = 0, rst_n = 1, flush_start = 0;
  logic [1:0] in_valid = '0;
  rsu_phase_e phase;
  logic in_ready, serial, flush_l, flush_r, en_l, en_r, write0, write1, read0, done;
  int checks = 0, failures = 0;

  rsu_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  initial begin
    int reads;
    #1 rst_n = 0;
    #1 rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      // sort phase
      for (int t = 0; t < 20; t++) begin
        @(negedge clk);
        in_valid = 2'($urandom);
        #1;
        check(in_ready && !serial && !flush_l && !flush_r && !read0 && !done, "sort controls");
        check(en_l == in_valid[0] && en_r == in_valid[1], "sort enables");
        check(write0 == in_valid[0] && write1 == in_valid[1], "sort writes");
      end
      @(negedge clk) flush_start = 1;
      @(negedge clk) flush_start = 0;
      in_valid = 2'b11;
      for (int t = 0; t <= N; t++) begin
        #1;
        check(!in_ready && serial && flush_r && !flush_l && en_l && en_r, "stage 1 controls");
        check(!write0 && !write1 && !read0 && !done, "stage 1 no access");
        @(negedge clk);
      end
      reads = 0;
      for (int t = 0; t <= N; t++) begin
        #1;
        check(!in_ready && serial && flush_r && flush_l && en_l && en_r, "stage 2 controls");
        check(read0 == (t != 0), "stage 2 read0");
        check(done == (t == N), "stage 2 done");
        reads += int'(read0);
        @(negedge clk);
      end
      check(reads == N, "N reads");
      #1 check(in_ready && phase == PH_SORT, "back to sort");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
