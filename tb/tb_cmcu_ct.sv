// tb_cmcu_ct: self-checking testbench of the counter cmcu_ct.
//
// Drives start, y0, yk and the load value T at random for many clocks and compares the
// address and busy flag after every clock with a model of the counter: idle until
// start, then A = A_START; while busy yk stops it, y0 increments A, otherwise A = T.
// Also checks the asynchronous reset in the middle of a run, and that increment, load,
// stop, start and ignored start all happened.
module tb_cmcu_ct;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0, y0 = 1'b0, yk = 1'b0;
  logic [7:0] t = '0;
  logic [7:0] a;
  logic       busy;

  int checks = 0, failures = 0;
  int n_inc = 0, n_load = 0, n_stop = 0, n_start = 0, n_ign = 0, n_wrap = 0;

  cmcu_ct dut (.clk(clk), .rst_n(rst_n), .start(start), .y0(y0), .yk(yk), .t(t),
               .a(a), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] ea, logic eb);
    checks++;
    if (a !== ea || busy !== eb) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t a=%0d busy=%b expected a=%0d busy=%b", $time, a, busy, ea, eb);
    end
  endtask

  initial begin
    logic [7:0] ma;
    logic       mb;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ma = 8'd0;
    mb = 1'b0;
    check(ma, mb);
    for (int i = 0; i < 20000; i++) begin
      start = ($urandom_range(0, 3) == 0);
      y0    = ($urandom_range(0, 3) != 0);
      yk    = ($urandom_range(0, 15) == 0);
      t     = 8'($urandom);
      if (!mb) begin
        if (start) begin ma = 8'd0; mb = 1'b1; n_start++; end
      end else begin
        if (start) n_ign++;
        if (yk) begin mb = 1'b0; n_stop++; end
        else if (y0) begin
          if (ma == 8'hFF) n_wrap++;
          ma = ma + 8'd1; n_inc++;
        end
        else begin ma = t; n_load++; end
      end
      @(negedge clk);
      check(ma, mb);
      if (i == 10000) begin
        // asynchronous reset between clock edges
        #2 rst_n = 1'b0;
        #1 check(8'd0, 1'b0);
        @(negedge clk);
        rst_n = 1'b1;
        ma = 8'd0;
        mb = 1'b0;
      end
    end
    checks++;
    if (n_inc == 0 || n_load == 0 || n_stop == 0 || n_start == 0 || n_ign == 0) begin
      failures++;
      $display("FAIL some counter operation never happened");
    end
    $display("inc=%0d load=%0d stop=%0d start=%0d ignored=%0d wrap=%0d", n_inc, n_load, n_stop, n_start, n_ign, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
