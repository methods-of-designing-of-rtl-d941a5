// tb_cmcu_ufd: self-checking testbench of cmcu_ufd (function decoder).
//
// Runs the example microprogram many times with random logic conditions and compares
// the microoperations y and the busy flag, cycle by cycle, with a walk of the example
// flow-chart (cmcu_ref_pkg) that knows nothing about addresses or tables. Also checks
// the timing: the first microinstruction appears one clock after start, every vertex
// takes exactly one clock, busy drops one clock after the last microinstruction, and a
// start pulse while busy is ignored. Stimulus changes on the falling clock edge and
// outputs are checked there.
module tb_cmcu_ufd;
  import cmcu_ref_pkg::*;

  localparam int RUNS = 300;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  logic [2:0] x = '0;
  logic [7:0] y;
  logic       busy;
  logic [7:0] a;

  int checks = 0, failures = 0;
  int branches = 0, steps = 0, starts_ignored = 0;

  cmcu_ufd dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .y(y), .busy(busy), .a(a));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && y == '0, "idle after reset");
    for (int run = 0; run < RUNS; run++) begin
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        check(!busy && y == '0, "idle between runs");
      end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      v = 1;
      cyc = 0;
      while (v != 0 && cyc < 1000) begin
        check(busy, $sformatf("busy at vertex b%0d", v));
        check(y == ref_y(v), $sformatf("y=%b at vertex b%0d, expected %b", y, v, ref_y(v)));
        x = 3'($urandom);
        start = ($urandom_range(0, 7) == 0);
        if (start) starts_ignored++;
        if (ref_branches(v)) branches++;
        steps++;
        v = ref_next(v, x);
        cyc++;
        @(negedge clk);
        start = 1'b0;
      end
      check(cyc < 1000, "run ended");
      check(!busy && y == '0, "busy drops one clock after the last microinstruction");
    end
    check(branches > 0 && starts_ignored > 0, "branches and ignored starts exercised");
    $display("steps=%0d branches=%0d ignored_starts=%0d", steps, branches, starts_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
