// tb_cmcu_top: end-to-end testbench of cmcu_top at its default parameters.
//
// The four control units are run at the same time, each with its own random start
// times and its own random logic conditions, so that they are in different places of
// the microprogram. Every clock, each unit's y and busy are compared with its own walk
// of the example flow-chart (cmcu_ref_pkg). Counted and required to happen at least
// once per unit: a start, an increment inside a chain, a jump at each branching vertex
// to each of its targets (for the function-decoder units this reads each decoder word
// in use), the end of the microprogram, and a start ignored while busy. Since every
// clock is checked, each run must take exactly one clock per vertex visited and busy
// must drop on the clock after the last microinstruction.
module tb_cmcu_top;
  import cmcu_ref_pkg::*;

  localparam int NU = 4;            // units: mm, fd, oi, of
  localparam int CYCLES = 40000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NU-1:0]      start = '0;
  logic [NU-1:0][2:0] x = '0;
  logic [NU-1:0][7:0] y;
  logic [NU-1:0]      busy;
  logic [NU-1:0][7:0] a;

  int checks = 0, failures = 0;
  string uname [NU] = '{"U_MM", "U_FD", "U_OI", "U_OIFD"};

  // mechanism counters per unit
  int n_start [NU], n_inc [NU], n_end [NU], n_ign [NU], n_runs [NU];
  int n_jump  [NU][12][12];  // [unit][from vertex][to vertex]

  cmcu_top dut (
    .clk(clk), .rst_n(rst_n),
    .mm_start(start[0]), .mm_x(x[0]), .mm_y(y[0]), .mm_busy(busy[0]), .mm_a(a[0]),
    .fd_start(start[1]), .fd_x(x[1]), .fd_y(y[1]), .fd_busy(busy[1]), .fd_a(a[1]),
    .oi_start(start[2]), .oi_x(x[2]), .oi_y(y[2]), .oi_busy(busy[2]), .oi_a(a[2]),
    .of_start(start[3]), .of_x(x[3]), .of_y(y[3]), .of_busy(busy[3]), .of_a(a[3]));

  always #5 clk = ~clk;

  task automatic check(bit ok, int u, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s: %s", $time, uname[u], what);
    end
  endtask

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [NU];      // current vertex, 0 = idle
    foreach (v[u]) begin
      v[u] = 0;
      n_start[u] = 0; n_inc[u] = 0; n_end[u] = 0; n_ign[u] = 0; n_runs[u] = 0;
      for (int i = 0; i < 12; i++) for (int j = 0; j < 12; j++) n_jump[u][i][j] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      for (int u = 0; u < NU; u++) begin
        int nv;
        if (v[u] == 0) begin
          check(!busy[u] && y[u] == '0, u, "idle");
          start[u] = ($urandom_range(0, 3) == 0);
          if (start[u]) begin
            n_start[u]++;
            v[u] = -1;   // first microinstruction appears after the next clock
          end
        end else begin
          if (v[u] == -1) v[u] = 1;
          check(busy[u], u, $sformatf("busy at b%0d", v[u]));
          check(y[u] == ref_y(v[u]), u, $sformatf("y=%b at b%0d", y[u], v[u]));
          x[u] = 3'($urandom);
          start[u] = ($urandom_range(0, 15) == 0);
          if (start[u]) n_ign[u]++;
          nv = ref_next(v[u], x[u]);
          if (nv == 0) begin
            n_end[u]++;
            n_runs[u]++;
          end else if (ref_branches(v[u])) n_jump[u][v[u]][nv]++;
          else n_inc[u]++;
          v[u] = nv;
        end
      end
    end
    @(negedge clk);
    for (int u = 0; u < NU; u++) begin
      int need [6][2] = '{'{3, 4}, '{3, 7}, '{3, 8}, '{6, 8}, '{6, 10}, '{9, 2}};
      check(n_start[u] > 0 && n_inc[u] > 0 && n_end[u] > 0 && n_ign[u] > 0, u,
            "start, increment, end and ignored start all happened");
      foreach (need[i])
        check(n_jump[u][need[i][0]][need[i][1]] > 0, u,
              $sformatf("jump b%0d->b%0d happened", need[i][0], need[i][1]));
      check(n_jump[u][9][4] > 0 && n_jump[u][9][10] > 0, u, "jumps b9->b4, b9->b10 happened");
      $display("%s: runs=%0d starts=%0d increments=%0d ends=%0d ignored_starts=%0d jumps b3->b4/b7/b8=%0d/%0d/%0d b6->b8/b10=%0d/%0d b9->b2/b4/b10=%0d/%0d/%0d",
               uname[u], n_runs[u], n_start[u], n_inc[u], n_end[u], n_ign[u],
               n_jump[u][3][4], n_jump[u][3][7], n_jump[u][3][8], n_jump[u][6][8], n_jump[u][6][10],
               n_jump[u][9][2], n_jump[u][9][4], n_jump[u][9][10]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
