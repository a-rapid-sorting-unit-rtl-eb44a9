// tb_rsu_dpram: self-checking test of the reference RAM. Random writes on
// both ports (distinct addresses in the same clock, as the RSU guarantees)
// are mirrored in a model array; port-0 reads must return the model word
// one clock after read0.
module tb_rsu_dpram;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned DW    = 20;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 0;
  logic [AW-1:0] addr0 = '0, addr1 = '0;
  logic write0 = 0, write1 = 0, read0 = 0;
  logic [DW-1:0] wdata0 = '0, wdata1 = '0, rdata0;
  logic [DW-1:0] model [DEPTH];
  bit            known [DEPTH];
  int checks = 0, failures = 0;

  rsu_dpram #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] exp;
    bit            exp_known;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      addr0  = AW'($urandom);
      addr1  = AW'($urandom);
      if (addr1 == addr0) addr1 = addr0 + 1'b1;
      read0  = ($urandom_range(0, 1) == 0);
      write0 = !read0 && ($urandom_range(0, 1) == 0);
      write1 = ($urandom_range(0, 1) == 0);
      wdata0 = DW'($urandom);
      wdata1 = DW'($urandom);
      exp       = model[addr0];
      exp_known = known[addr0];
      @(posedge clk); #1;
      if (write0) begin model[addr0] = wdata0; known[addr0] = 1; end
      if (write1) begin model[addr1] = wdata1; known[addr1] = 1; end
      if (read0 && exp_known) begin
        checks++;
        if (rdata0 !== exp) begin
          failures++;
          $display("FAIL read addr %0d: %h expected %h", addr0, rdata0, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
