// tb_ss_pe: self-checking test of one shifter-sorter processing element.
// Drives random broadcast words D, right-neighbour words D_{i+1} and control
// bits, and checks the combinational D_i output and the next register value
// against R_i+ = p R_i + !p D_{i+1}, D_i = p D + !p R_i with
// p = !flush & (key(R_i) >= key(D)); also reset value, clear and enable.
module tb_ss_pe;
  localparam int unsigned DW = 12;
  localparam int unsigned KW = 8;
  localparam logic [DW-1:0] RV = 12'h0A5;

  logic clk = 0, rst_n = 1, en = 0, clr = 0, flush = 0;
  logic [DW-1:0] d = '0, d_right = '0, d_left, r;
  int checks = 0, failures = 0;

  ss_pe #(.DW(DW), .KW(KW), .RST_VAL(RV)) dut (.*);

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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [DW-1:0] r_prev, exp_r, exp_l;
    bit p;
    #1 rst_n = 0;
    #1;
    check(r == RV, "reset value");
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      en      = ($urandom_range(0, 7) != 0);
      clr     = ($urandom_range(0, 31) == 0);
      flush   = ($urandom_range(0, 5) == 0);
      // keys from a small range so ties happen often
      d       = {4'($urandom_range(0, 5)), 8'($urandom)} ;
      d_right = DW'($urandom);
      #1;
      p     = !flush && (r[DW-1 -: KW] >= d[DW-1 -: KW]);
      exp_l = p ? d : r;
      check(d_left == exp_l, "d_left");
      r_prev = r;
      exp_r  = clr ? RV : (en && !p) ? d_right : r_prev;
      @(posedge clk); #1;
      check(r == exp_r, "register update");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
