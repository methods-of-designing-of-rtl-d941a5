// tb_cmcu_cm: self-checking testbench of the control memory cmcu_cm.
//
// Reads all 256 words. Word a holds vertex b_(a+1) of the example flow-chart for
// a < 11: its microoperations (from cmcu_ref_pkg), y0 = 1 unless the vertex branches
// or is the last one, yk = 1 only for the last one (b11). All other words read 0.
module tb_cmcu_cm;
  import cmcu_ref_pkg::*;

  logic [7:0] a;
  logic [7:0] y;
  logic       y0, yk;

  int checks = 0, failures = 0;

  cmcu_cm dut (.a(a), .y(y), .y0(y0), .yk(yk));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) begin
      int v;
      a = 8'(k);
      #1;
      v = k + 1;
      checks++;
      if (k < NV) begin
        if (y !== ref_y(v) || y0 !== (!ref_branches(v) && v != NV) || yk !== (v == NV)) begin
          failures++;
          $display("FAIL A=%0d y=%b y0=%b yk=%b", k, y, y0, yk);
        end
      end else if (y !== '0 || y0 || yk) begin
        failures++;
        $display("FAIL unused A=%0d not zero", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
