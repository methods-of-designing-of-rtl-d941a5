// cmcu_umm: compositional microprogram control unit with mutual memory (U_MM).
//
// The flow-chart's operational vertices are grouped into operational linear chains
// (OLCs) and each chain is stored at consecutive addresses of the control memory CM.
// The counter CT addresses CM; the word read out gives the microoperations Y and two
// flags. While y0 = 1 the counter simply increments and walks along the chain. At the
// chain's output y0 = 0 and the counter is loaded with T = f(X, A), computed by the
// combinational circuit CC from the logic conditions X and the full address A. yk marks
// the last microinstruction; the unit then stops until the next start.
//
//   X, A -> CC -> T -> CT -> A -> CM -> Y, with y0/yk from CM back to CT
//
// Timing: one microinstruction per clock. start is sampled while idle; on the next
// clock A = A_START and the first microinstruction is on y. X is sampled at the clock
// edge that ends an OLC-output microinstruction. y is zero while the unit is idle.
// The structure is the published CMCU method's; widths, reset and the start/busy interface are
// this design's choices, the tables are the example flow-chart of cmcu_pkg.
module cmcu_umm
#(
  parameter int unsigned R    = cmcu_pkg::R,
  parameter int unsigned N    = cmcu_pkg::N,
  parameter int unsigned L    = cmcu_pkg::L,
  parameter int unsigned ROWS = cmcu_pkg::EX_ROWS,
  parameter logic [R-1:0]   A_START = cmcu_pkg::A_START,
  parameter logic [N+1:0]   CM_INIT   [2**R] = cmcu_pkg::EX_CM,
  parameter logic [R-1:0]   ROW_A     [ROWS] = cmcu_pkg::EX_ROW_A,
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

  logic [R-1:0] t;
  logic [N-1:0] cm_y;
  logic         y0, yk;

  cmcu_cc #(.KW(R), .L(L), .OW(R), .ROWS(ROWS), .ROW_KEY(ROW_A), .ROW_XMASK(ROW_XMASK),
            .ROW_XVAL(ROW_XVAL), .ROW_OUT(ROW_T))
    u_cc (.key(a), .x(x), .out(t));

  cmcu_ct #(.R(R), .A_START(A_START))
    u_ct (.clk(clk), .rst_n(rst_n), .start(start), .y0(y0), .yk(yk), .t(t), .a(a), .busy(busy));

  cmcu_cm #(.R(R), .N(N), .INIT(CM_INIT))
    u_cm (.a(a), .y(cm_y), .y0(y0), .yk(yk));

  assign y = busy ? cm_y : '0;

endmodule
