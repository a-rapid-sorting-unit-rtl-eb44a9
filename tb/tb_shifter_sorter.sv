// tb_shifter_sorter: self-checking test of the N-cell shifter sorter.
// A queue model keeps the N cells in ascending key order; each insertion
// places D below every cell of equal or higher key and drops the lowest
// word, which must appear on w; a flush shifts everything left. Keys come
// from a small range so equal keys occur, and the low bits carry a payload
// that must travel with its key. Checks reset values (base + i*step),
// every cell after every clock, w, enable and clear.
module tb_shifter_sorter;
  localparam int unsigned N  = 8;
  localparam int unsigned DW = 16;
  localparam int unsigned KW = 10;
  localparam logic [DW-1:0] BASE = 16'd3;
  localparam logic [DW-1:0] STEP = 16'd1;

  logic clk = 0, rst_n = 1, en = 0, clr = 0, flush = 0;
  logic [DW-1:0] d = '0, w;
  logic [DW-1:0] cells [N];
  logic [DW-1:0] model [N];
  int checks = 0, failures = 0;
  int flushes = 0;

  shifter_sorter #(.N(N), .DW(DW), .KW(KW), .RST_BASE(BASE), .RST_STEP(STEP)) dut (.*);

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

  function automatic logic [KW-1:0] key(logic [DW-1:0] v);
    return v[DW-1 -: KW];
  endfunction

  task automatic model_reset();
    for (int i = 0; i < N; i++) model[i] = BASE + DW'(i) * STEP;
  endtask

  task automatic check_cells(string what);
    for (int i = 0; i < N; i++) begin
      check(cells[i] == model[i], what);
      if (cells[i] != model[i]) $display("  cell %0d: %h expected %h", i, cells[i], model[i]);
    end
  endtask

  initial begin
    logic [DW-1:0] all [N+1];
    logic [DW-1:0] exp_w;
    int pos;
    int flush_left = 0;
    #1 rst_n = 0;
    model_reset();
    #1 check_cells("reset values");
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      // Flushes come in runs of N enabled shifts of zero keys, which leave
      // the array sorted again (all keys zero), as in the RSU.
      if (flush_left == 0 && $urandom_range(0, 99) == 0) flush_left = N;
      flush = (flush_left != 0);
      en    = flush || ($urandom_range(0, 9) != 0);
      clr   = !flush && ($urandom_range(0, 199) == 0);
      d     = {flush ? KW'(0) : KW'($urandom_range(0, 40)), (DW-KW)'($urandom)};
      if (flush) begin
        flush_left--;
        flushes++;
      end
      #1;
      if (flush) begin
        exp_w = model[0];
        for (int i = 0; i < N-1; i++) all[i] = model[i+1];
        all[N-1] = d;
      end else begin
        pos = 0;
        for (int i = 0; i < N; i++) if (key(model[i]) < key(d)) pos = i + 1;
        for (int i = 0; i < pos; i++) all[i] = model[i];
        all[pos] = d;
        for (int i = pos; i < N; i++) all[i+1] = model[i];
        exp_w = all[0];
        for (int i = 0; i < N; i++) all[i] = all[i+1];
      end
      check(w == exp_w, "w output");
      @(posedge clk); #1;
      if (clr) model_reset();
      else if (en) for (int i = 0; i < N; i++) model[i] = all[i];
      check_cells("cells");
    end
    check(flushes > 0, "flush mode exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
