// cmcu_uoi: compositional microprogram control unit with outputs identification (U_OI).
//
// CC only has to act at OLC outputs, so it does not need the whole address: a few
// address bits Q (a subset of A) that differ between all OLC outputs are enough to know
// which output has been reached. CC computes T = f(X, Q), which shrinks its inputs and
// the feedback from the counter. The addresses must be assigned so that such bits
// exist; in the example flow-chart of cmcu_pkg the outputs sit at 2, 5 and 8 and bits
// A3 and A0 separate them (Q_MASK = 8'b0000_1001). The end microinstruction shares a Q
// code with an output, which is harmless because CT stops on yk and ignores T.
//
//   X, Q -> CC -> T -> CT -> A -> CM -> Y, Q taken from A, y0/yk from CM back to CT
//
// Timing as in cmcu_umm. The structure is the published CMCU method's; the choice of Q bits follows
// from the example, and widths, reset and start/busy interface are this design's.
module cmcu_uoi
#(
  parameter int unsigned R    = cmcu_pkg::R,
  parameter int unsigned N    = cmcu_pkg::N,
  parameter int unsigned L    = cmcu_pkg::L,
  parameter int unsigned QW   = cmcu_pkg::QW,
  parameter int unsigned ROWS = cmcu_pkg::EX_ROWS,
  parameter logic [R-1:0]   Q_MASK  = cmcu_pkg::Q_MASK,
  parameter logic [R-1:0]   A_START = cmcu_pkg::A_START,
  parameter logic [N+1:0]   CM_INIT   [2**R] = cmcu_pkg::EX_CM,
  parameter logic [QW-1:0]  ROW_Q     [ROWS] = cmcu_pkg::EX_ROW_Q,
  parameter logic [L-1:0]   ROW_XMASK [ROWS] = cmcu_pkg::EX_ROW_XMASK,
  parameter logic [L-1:0]   ROW_XVAL  [ROWS] = cmcu_pkg::EX_ROW_XVAL,
  parameter logic [R-1:0]   ROW_T     [ROWS] = cmcu_pkg::EX_ROW_T
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [L-1:0] x,
  output logic [N-1:0] y,
  output logic         busy,
  output logic [R-1:0] a
);

  logic [QW-1:0] q;
  logic [R-1:0]  t;
  logic [N-1:0]  cm_y;
  logic          y0, yk;

  // Q = the address bits selected by Q_MASK, lowest selected bit first.
  function automatic int unsigned qpos(int unsigned k);
    int unsigned c = 0;
    for (int unsigned i = 0; i < R; i++) begin
      if (Q_MASK[i]) begin
        if (c == k) return i;
        c++;
      end
    end
    return 0;
  endfunction

  for (genvar k = 0; k < int'(QW); k++) begin : g_q
    assign q[k] = a[qpos(k)];
  end

  cmcu_cc #(.KW(QW), .L(L), .OW(R), .ROWS(ROWS), .ROW_KEY(ROW_Q), .ROW_XMASK(ROW_XMASK),
            .ROW_XVAL(ROW_XVAL), .ROW_OUT(ROW_T))
    u_cc (.key(q), .x(x), .out(t));

  cmcu_ct #(.R(R), .A_START(A_START))
    u_ct (.clk(clk), .rst_n(rst_n), .start(start), .y0(y0), .yk(yk), .t(t), .a(a), .busy(busy));

  cmcu_cm #(.R(R), .N(N), .INIT(CM_INIT))
    u_cm (.a(a), .y(cm_y), .y0(y0), .yk(yk));

  assign y = busy ? cm_y : '0;

endmodule
