// cmcu_cm: control memory CM.
//
// Holds one microinstruction per operational vertex of the flow-chart. A word has N+2
// bits: N for the microoperations in unitary encoding, y0 (the next address is this
// one plus one, i.e. the transition stays inside the OLC) and yk (the last
// microinstruction; fetching stops). These three fields and the word width come from
// the CMCU method; the order {yk, y0, y_N..y_1} is this design's choice. The word does
// not hold any part of the next address: that is what keeps CM small.
//
// ROM array of 2^R words, read asynchronously: the outputs follow the address A from
// the counter within the same cycle. Default contents: the example of cmcu_pkg.
module cmcu_cm
#(
  parameter int unsigned R = cmcu_pkg::R,
  parameter int unsigned N = cmcu_pkg::N,
  parameter logic [N+1:0] INIT [2**R] = cmcu_pkg::EX_CM
) (
  input  logic [R-1:0] a,
  output logic [N-1:0] y,
  output logic         y0,
  output logic         yk
);

  logic [N+1:0] rom [2**R];
  logic [N+1:0] word;

  always_comb begin
    rom  = INIT;
    word = rom[a];
  end

  assign y  = word[N-1:0];
  assign y0 = word[N];
  assign yk = word[N+1];

  // A microinstruction that ends the microprogram cannot also continue its chain.
  always_comb assert (!(y0 && yk)) else $error("cmcu_cm: word %0d has both y0 and yk set", a);

endmodule
