// tb_flush_counter: checks that the flush counter advances one step per
// clock while enabled, stops at MAX with done raised after exactly MAX
// enabled clocks, and returns to zero when the enable falls.
module tb_flush_counter;
  localparam int unsigned MAX = 12;
  localparam int unsigned CW  = $clog2(MAX + 1);

  logic clk = 0, rst_n = 1, en = 0;
  logic [CW-1:0] count;
  logic done, last;
  int checks = 0, failures = 0;

  flush_counter #(.MAX(MAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (count=%0d)", what, $time, count);
    end
  endtask

  initial begin
    int exp_c;
    #1 rst_n = 0;
    #1 check(count == 0 && !done, "reset");
    @(negedge clk) rst_n = 1;
    exp_c = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      en = (t % 40) < 30 ? 1'b1 : ($urandom_range(0, 3) == 0);
      #1 check(last == (en && exp_c == MAX - 1), "last");
      @(posedge clk); #1;
      if (!en) exp_c = 0;
      else if (exp_c < MAX) exp_c++;
      check(count == CW'(exp_c), "count");
      check(done == (exp_c == MAX), "done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
