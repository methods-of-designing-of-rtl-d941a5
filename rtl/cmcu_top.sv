// cmcu_top: the four compositional microprogram control unit structures side by side.
//
//   mm_*  cmcu_umm   : mutual memory             T = f(X, A)
//   fd_*  cmcu_ufd   : function decoder          Z = f(X, A), T = f(Z)
//   oi_*  cmcu_uoi   : outputs identification    T = f(X, Q)
//   of_*  cmcu_uoifd : both                      Z = f(X, Q), T = f(Z)
//
// They are alternative realisations of one control algorithm, not parts of one
// circuit, so each keeps its own start, conditions X, microoperations Y, busy flag and
// address. With the same start and X sequence all four produce the same Y sequence
// cycle for cycle. Clock and reset are shared. Defaults run the example flow-chart
// of cmcu_pkg in every unit.
module cmcu_top
#(
  parameter int unsigned R = cmcu_pkg::R,
  parameter int unsigned N = cmcu_pkg::N,
  parameter int unsigned L = cmcu_pkg::L
) (
  input  logic         clk,
  input  logic         rst_n,

  input  logic         mm_start,
  input  logic [L-1:0] mm_x,
  output logic [N-1:0] mm_y,
  output logic         mm_busy,
  output logic [R-1:0] mm_a,

  input  logic         fd_start,
  input  logic [L-1:0] fd_x,
  output logic [N-1:0] fd_y,
  output logic         fd_busy,
  output logic [R-1:0] fd_a,

  input  logic         oi_start,
  input  logic [L-1:0] oi_x,
  output logic [N-1:0] oi_y,
  output logic         oi_busy,
  output logic [R-1:0] oi_a,

  input  logic         of_start,
  input  logic [L-1:0] of_x,
  output logic [N-1:0] of_y,
  output logic         of_busy,
  output logic [R-1:0] of_a
);

  cmcu_umm #(.R(R), .N(N), .L(L)) u_mm (
    .clk(clk), .rst_n(rst_n), .start(mm_start), .x(mm_x), .y(mm_y), .busy(mm_busy), .a(mm_a));

  cmcu_ufd #(.R(R), .N(N), .L(L)) u_fd (
    .clk(clk), .rst_n(rst_n), .start(fd_start), .x(fd_x), .y(fd_y), .busy(fd_busy), .a(fd_a));

  cmcu_uoi #(.R(R), .N(N), .L(L)) u_oi (
    .clk(clk), .rst_n(rst_n), .start(oi_start), .x(oi_x), .y(oi_y), .busy(oi_busy), .a(oi_a));

  cmcu_uoifd #(.R(R), .N(N), .L(L)) u_of (
    .clk(clk), .rst_n(rst_n), .start(of_start), .x(of_x), .y(of_y), .busy(of_busy), .a(of_a));

endmodule
