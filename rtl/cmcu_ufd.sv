// cmcu_ufd: compositional microprogram control unit with function decoder (U_FD).
//
// Same as the mutual-memory unit except for how the counter's load value is made.
// All OLC inputs that can be jumped to are numbered with a short code Z (ZW bits,
// the fewest that hold their number). CC computes Z = f(X, A), which needs fewer
// output functions than the full address, and the function decoder FD, a memory,
// turns Z into the load value T = f(Z).
//
//   X, A -> CC -> Z -> FD -> T -> CT -> A -> CM -> Y, with y0/yk from CM back to CT
//
// Timing as in cmcu_umm: one microinstruction per clock, FD read is combinational so
// a jump between chains costs no extra cycle. The structure is the published CMCU method's; the
// code assignment, widths, reset and start/busy interface are this design's choices.
module cmcu_ufd
#(
  parameter int unsigned R    = cmcu_pkg::R,
  parameter int unsigned N    = cmcu_pkg::N,
  parameter int unsigned L    = cmcu_pkg::L,
  parameter int unsigned ZW   = cmcu_pkg::ZW,
  parameter int unsigned ROWS = cmcu_pkg::EX_ROWS,
  parameter logic [R-1:0]   A_START = cmcu_pkg::A_START,
  parameter logic [N+1:0]   CM_INIT   [2**R]  = cmcu_pkg::EX_CM,
  parameter logic [R-1:0]   FD_INIT   [2**ZW] = cmcu_pkg::EX_FD,
  parameter logic [R-1:0]   ROW_A     [ROWS] = cmcu_pkg::EX_ROW_A,
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

  logic [ZW-1:0] z;
  logic [R-1:0]  t;
  logic [N-1:0]  cm_y;
  logic          y0, yk;

  cmcu_cc #(.KW(R), .L(L), .OW(ZW), .ROWS(ROWS), .ROW_KEY(ROW_A), .ROW_XMASK(ROW_XMASK),
            .ROW_XVAL(ROW_XVAL), .ROW_OUT(ROW_Z))
    u_cc (.key(a), .x(x), .out(z));

  cmcu_fd #(.ZW(ZW), .R(R), .INIT(FD_INIT))
    u_fd (.z(z), .t(t));

  cmcu_ct #(.R(R), .A_START(A_START))
    u_ct (.clk(clk), .rst_n(rst_n), .start(start), .y0(y0), .yk(yk), .t(t), .a(a), .busy(busy));

  cmcu_cm #(.R(R), .N(N), .INIT(CM_INIT))
    u_cm (.a(a), .y(cm_y), .y0(y0), .yk(yk));

  assign y = busy ? cm_y : '0;

endmodule
