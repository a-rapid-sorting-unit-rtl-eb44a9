// tb_rsu_sorter_unit: self-checking test of one RSU sorter (N cells of
// {score, address} plus the X buffer). Checks the distinct initial
// addresses (X = base, cell i = base+1+i, scores zero), then random
// insertions against a queue model where the dropped word lands in X, and
// flush runs (zero scores shifted in, cell 0 into X). The address field
// must travel with its score; only the score is compared.
module tb_rsu_sorter_unit;
  localparam int unsigned N  = 6;
  localparam int unsigned SW = 8;
  localparam int unsigned AW = 5;
  localparam int unsigned DW = SW + AW;
  localparam logic [AW-1:0] BASE = 5'd9;

  logic clk = 0, rst_n = 1, en = 0, flush = 0;
  logic [DW-1:0] d = '0, x_q;
  logic [DW-1:0] cells [N];
  logic [DW-1:0] model [N];
  logic [DW-1:0] model_x;
  int checks = 0, failures = 0, flushes = 0, drops_of_d = 0;

  rsu_sorter_unit #(.N(N), .SW(SW), .AW(AW), .ADDR_BASE(BASE)) dut (.*);

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

  task automatic check_all(string what);
    check(x_q == model_x, {what, " X"});
    for (int i = 0; i < N; i++) check(cells[i] == model[i], {what, " cell"});
  endtask

  initial begin
    logic [DW-1:0] all [N+1];
    int pos, flush_left = 0;
    #1 rst_n = 0;
    model_x = DW'(BASE);
    for (int i = 0; i < N; i++) model[i] = DW'(BASE) + DW'(i + 1);
    #1 check_all("reset");
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      if (flush_left == 0 && $urandom_range(0, 60) == 0) flush_left = N + 1;
      flush = (flush_left != 0);
      en    = flush || ($urandom_range(0, 4) != 0);
      d     = {flush ? SW'(0) : SW'($urandom_range(0, 60)), AW'($urandom)};
      if (flush) begin
        flush_left--;
        flushes++;
      end
      @(posedge clk); #1;
      if (en) begin
        if (flush) begin
          all[0] = model[0];
          for (int i = 0; i < N-1; i++) all[i+1] = model[i+1];
          model_x = model[0];
          for (int i = 0; i < N-1; i++) model[i] = model[i+1];
          model[N-1] = d;
        end else begin
          pos = 0;
          for (int i = 0; i < N; i++) if (model[i][DW-1 -: SW] < d[DW-1 -: SW]) pos = i + 1;
          for (int i = 0; i < pos; i++) all[i] = model[i];
          all[pos] = d;
          for (int i = pos; i < N; i++) all[i+1] = model[i];
          if (pos == 0) drops_of_d++;
          model_x = all[0];
          for (int i = 0; i < N; i++) model[i] = all[i+1];
        end
      end
      check_all("step");
    end
    check(flushes > 0 && drops_of_d > 0, "flush and reject both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
