// tb_cmcu_fd: self-checking testbench of the function decoder cmcu_fd.
//
// Applies every code Z and checks the address of the OLC input it names: codes 0..4
// name b2, b4, b7, b8, b10 of the example flow-chart, whose vertex b_v sits at address
// v-1; unused codes read 0.
module tb_cmcu_fd;

  logic [2:0] z;
  logic [7:0] t;

  int checks = 0, failures = 0;

  cmcu_fd dut (.z(z), .t(t));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vert [8] = '{2, 4, 7, 8, 10, 0, 0, 0};
    for (int k = 0; k < 8; k++) begin
      z = 3'(k);
      #1;
      checks++;
      if (t !== ((vert[k] == 0) ? 8'd0 : 8'(vert[k] - 1))) begin
        failures++;
        $display("FAIL Z=%0d T=%0d", k, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
