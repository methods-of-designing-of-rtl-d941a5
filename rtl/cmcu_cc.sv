// cmcu_cc: combinational circuit CC of a compositional microprogram control unit.
//
// At an OLC output the counter must be loaded with the address of the next OLC input
// (or, in the function-decoder variants, with a short code Z of that input). CC
// computes this from the logic conditions X and a key that identifies the OLC output:
// the whole address A (mutual-memory structure) or the few address bits Q that are
// enough to tell the outputs apart (outputs-identification structure).
//
// It is written as a transition table, the usual form of such a circuit: row r fires
// when key == ROW_KEY[r] and the conditions match the cube (x & ROW_XMASK[r]) ==
// ROW_XVAL[r]; the outputs of all firing rows are ORed, as the sum-of-products
// excitation functions would be. Rows of one key must be mutually exclusive. When no
// row fires the output is zero; the counter ignores CC inside an OLC anyway.
// The CMCU method fixes only what CC computes (T = f(X,A), Z = f(X,A), T = f(X,Q),
// Z = f(X,Q)); the table form and the default contents are this design's choice.
//
// Purely combinational, no clock.
module cmcu_cc
#(
  parameter int unsigned KW   = cmcu_pkg::R,        // key width (|A| or |Q|)
  parameter int unsigned L    = cmcu_pkg::L,        // number of logic conditions
  parameter int unsigned OW   = cmcu_pkg::R,        // output width (|T| or |Z|)
  parameter int unsigned ROWS = cmcu_pkg::EX_ROWS,
  parameter logic [KW-1:0] ROW_KEY   [ROWS] = cmcu_pkg::EX_ROW_A,
  parameter logic [L-1:0]  ROW_XMASK [ROWS] = cmcu_pkg::EX_ROW_XMASK,
  parameter logic [L-1:0]  ROW_XVAL  [ROWS] = cmcu_pkg::EX_ROW_XVAL,
  parameter logic [OW-1:0] ROW_OUT   [ROWS] = cmcu_pkg::EX_ROW_T
) (
  input  logic [KW-1:0] key,
  input  logic [L-1:0]  x,
  output logic [OW-1:0] out
);

  logic [ROWS-1:0] fire;

  always_comb begin
    out = '0;
    for (int r = 0; r < int'(ROWS); r++) begin
      fire[r] = (key == ROW_KEY[r]) && ((x & ROW_XMASK[r]) == ROW_XVAL[r]);
      if (fire[r]) out = out | ROW_OUT[r];
    end
  end

endmodule
