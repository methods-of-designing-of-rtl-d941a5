// cmcu_uoifd: compositional microprogram control unit with outputs identification and
// function decoder (U_OIFD).
//
// Both savings combined: CC sees only the output-identifying address bits Q and
// produces only the short code Z of the target OLC input, Z = f(X, Q); the function
// decoder memory FD turns Z into the counter load value, T = f(Z). Of the four
// structures this one needs the least logic for CC, at the cost of a second memory
// (FD) beside the control memory CM.
//
//   X, Q -> CC -> Z -> FD -> T -> CT -> A -> CM -> Y, Q taken from A
//
// Timing as in cmcu_umm. The structure is the published CMCU method's; Q bits, Z codes, widths,
// reset and start/busy interface are this design's choices (see cmcu_pkg).
module cmcu_uoifd
#(
  parameter int unsigned R    = cmcu_pkg::R,
  parameter int unsigned N    = cmcu_pkg::N,
  parameter int unsigned L    = cmcu_pkg::L,
  parameter int unsigned QW   = cmcu_pkg::QW,
  parameter int unsigned ZW   = cmcu_pkg::ZW,
  parameter int unsigned ROWS = cmcu_pkg::EX_ROWS,
  parameter logic [R-1:0]   Q_MASK  = cmcu_pkg::Q_MASK,
  parameter logic [R-1:0]   A_START = cmcu_pkg::A_START,
  parameter logic [N+1:0]   CM_INIT   [2**R]  = cmcu_pkg::EX_CM,
  parameter logic [R-1:0]   FD_INIT   [2**ZW] = cmcu_pkg::EX_FD,
  parameter logic [QW-1:0]  ROW_Q     [ROWS] = cmcu_pkg::EX_ROW_Q,
  parameter logic [L-1:0]   ROW_XMASK [ROWS] = cmcu_pkg::EX_ROW_XMASK,
  parameter logic [L-1:0]   ROW_XVAL  [ROWS] = cmcu_pkg::EX_ROW_XVAL,
  parameter logic [ZW-1:0]  ROW_Z     [ROWS] = cmcu_pkg::EX_ROW_Z
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
  logic [ZW-1:0] z;
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

  cmcu_cc #(.KW(QW), .L(L), .OW(ZW), .ROWS(ROWS), .ROW_KEY(ROW_Q), .ROW_XMASK(ROW_XMASK),
            .ROW_XVAL(ROW_XVAL), .ROW_OUT(ROW_Z))
    u_cc (.key(q), .x(x), .out(z));

  cmcu_fd #(.ZW(ZW), .R(R), .INIT(FD_INIT))
    u_fd (.z(z), .t(t));

  cmcu_ct #(.R(R), .A_START(A_START))
    u_ct (.clk(clk), .rst_n(rst_n), .start(start), .y0(y0), .yk(yk), .t(t), .a(a), .busy(busy));

  cmcu_cm #(.R(R), .N(N), .INIT(CM_INIT))
    u_cm (.a(a), .y(cm_y), .y0(y0), .yk(yk));

  assign y = busy ? cm_y : '0;

endmodule
