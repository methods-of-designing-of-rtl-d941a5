// tb_cmcu_cc: self-checking testbench of the combinational circuit cmcu_cc.
//
// Two instances with the example tables: one keyed by the full address A and producing
// the load address T (mutual-memory structure), one keyed by the output-identifying
// bits Q and producing the input code Z (outputs identification with function
// decoder). Every key and every condition vector is applied; the expected value comes
// from the flow-chart walk of cmcu_ref_pkg: at the address of a branching vertex b_v
// (address v-1) the output is the address or code of ref_next(v, x), elsewhere 0.
module tb_cmcu_cc;
  import cmcu_ref_pkg::*;

  logic [7:0] key;
  logic [1:0] qkey;
  logic [2:0] x;
  logic [7:0] t;
  logic [2:0] z;

  int checks = 0, failures = 0;

  cmcu_cc dut_t (.key(key), .x(x), .out(t));

  cmcu_cc #(.KW(2), .L(3), .OW(3), .ROWS(cmcu_pkg::EX_ROWS), .ROW_KEY(cmcu_pkg::EX_ROW_Q),
            .ROW_XMASK(cmcu_pkg::EX_ROW_XMASK), .ROW_XVAL(cmcu_pkg::EX_ROW_XVAL),
            .ROW_OUT(cmcu_pkg::EX_ROW_Z))
    dut_z (.key(qkey), .x(x), .out(z));

  // Code of an OLC input as numbered for the function decoder
  function automatic logic [2:0] zcode(int v);
    case (v)
      2: return 3'd0;
      4: return 3'd1;
      7: return 3'd2;
      8: return 3'd3;
      default: return 3'd4;  // b10
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_t;
    for (int k = 0; k < 256; k++) begin
      for (int xi = 0; xi < 8; xi++) begin
        key = 8'(k);
        x   = 3'(xi);
        #1;
        exp_t = (k < NV && ref_branches(k + 1)) ? 8'(ref_next(k + 1, x) - 1) : 8'd0;
        checks++;
        if (t !== exp_t) begin
          failures++;
          if (failures < 10) $display("FAIL A=%0d x=%b T=%0d expected %0d", k, x, t, exp_t);
        end
      end
    end
    // Q = {A3, A0}: b3 (A=2) -> 00, b6 (A=5) -> 01, b9 (A=8) -> 10
    for (int qi = 0; qi < 4; qi++) begin
      for (int xi = 0; xi < 8; xi++) begin
        int v;
        qkey = 2'(qi);
        x    = 3'(xi);
        #1;
        v = (qi == 0) ? 3 : (qi == 1) ? 6 : (qi == 2) ? 9 : 0;
        checks++;
        if (z !== ((v == 0) ? 3'd0 : zcode(ref_next(v, x)))) begin
          failures++;
          if (failures < 10) $display("FAIL Q=%0d x=%b Z=%0d", qi, x, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
