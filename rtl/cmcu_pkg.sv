// cmcu_pkg: sizes, microinstruction format and the example microprogram shared by
// the compositional microprogram control units (CMCUs).
//
// A CMCU interprets a flow-chart whose operational vertices have been grouped into
// operational linear chains (OLCs). Inside an OLC the vertices sit at consecutive
// addresses, so the next address is the current one plus one; only at an OLC output
// does a combinational circuit have to compute where to go.
//
// Microinstruction format (N+2 bits, unitary encoding of the microoperations):
//   [N+1] yk  - last microinstruction of the microprogram, fetching stops after it
//   [N]   y0  - next address is the current one plus one (transition inside an OLC)
//   [N-1:0]   - y_N .. y_1, one bit per microoperation
// The bit order is this design's choice.
//
// The tables below describe one example flow-chart, chosen for this design (the method
// works for any flow-chart; only these tables change). 11 operational vertices
// b1..b11, conditions x1..x3, microoperations y1..y8, four OLCs:
//   a1 = <b1,b2,b3>   addresses 0..2   output b3
//   a2 = <b4,b5,b6>   addresses 3..5   output b6
//   a3 = <b7,b8,b9>   addresses 6..8   output b9
//   a4 = <b10,b11>    addresses 9..10  b11 -> end vertex
// Transitions at the OLC outputs:
//   b3: x1 -> b4;  !x1 & x2 -> b7;  !x1 & !x2 -> b8
//   b6: x2 -> b8;  !x2 -> b10
//   b9: x3 & x1 -> b2;  x3 & !x1 -> b4;  !x3 -> b10
// The inputs entered from OLC outputs are b2, b4, b7, b8, b10; their codes Z (used by
// the function-decoder variants) are 0, 1, 2, 3, 4.
package cmcu_pkg;

  // Flow-chart sizes of the example
  localparam int unsigned N  = 8;   // microoperations y1..yN
  localparam int unsigned L  = 3;   // logic conditions x1..xL
  localparam int unsigned R  = 8;   // address width of CT and CM (2^R words)
  localparam int unsigned ZW = 3;   // width of the OLC-input code Z
  localparam int unsigned QW = 2;   // number of address bits that identify OLC outputs

  localparam int unsigned CM_W = N + 2;

  // Address bits that make up Q in the outputs-identification variants.
  // OLC outputs sit at 2 (0000_0010), 5 (0000_0101) and 8 (0000_1000): bits A3 and A0
  // already separate them.
  localparam logic [R-1:0] Q_MASK = 8'b0000_1001;

  localparam logic [R-1:0] A_START = '0;  // address of the first microinstruction (b1)

  // Control memory image: {yk, y0, y8..y1}
  localparam logic [CM_W-1:0] EX_CM [2**R] = '{
    0:  10'b0_1_0000_0011,  // b1 : y1 y2
    1:  10'b0_1_0000_0100,  // b2 : y3
    2:  10'b0_0_0000_1001,  // b3 : y1 y4        (OLC output)
    3:  10'b0_1_0001_0000,  // b4 : y5
    4:  10'b0_1_0010_0010,  // b5 : y2 y6
    5:  10'b0_0_0100_0000,  // b6 : y7           (OLC output)
    6:  10'b0_1_1000_0100,  // b7 : y3 y8
    7:  10'b0_1_0001_1000,  // b8 : y4 y5
    8:  10'b0_0_0010_0000,  // b9 : y6           (OLC output)
    9:  10'b0_1_0100_0010,  // b10: y2 y7
    10: 10'b1_0_1000_0001,  // b11: y1 y8        (end)
    default: '0
  };

  // Transition table of the combinational circuit CC, one row per product term.
  // A row fires when the key equals ROW_A (or ROW_Q) and (x & ROW_XMASK) == ROW_XVAL.
  // x[0] = x1, x[1] = x2, x[2] = x3.
  localparam int unsigned EX_ROWS = 8;

  localparam logic [R-1:0]  EX_ROW_A     [EX_ROWS] = '{8'd2, 8'd2, 8'd2, 8'd5, 8'd5, 8'd8, 8'd8, 8'd8};
  localparam logic [QW-1:0] EX_ROW_Q     [EX_ROWS] = '{2'b00, 2'b00, 2'b00, 2'b01, 2'b01, 2'b10, 2'b10, 2'b10};
  localparam logic [L-1:0]  EX_ROW_XMASK [EX_ROWS] = '{3'b001, 3'b011, 3'b011, 3'b010, 3'b010, 3'b101, 3'b101, 3'b100};
  localparam logic [L-1:0]  EX_ROW_XVAL  [EX_ROWS] = '{3'b001, 3'b010, 3'b000, 3'b010, 3'b000, 3'b101, 3'b100, 3'b000};
  // target address T (for CC driving CT directly) ...
  localparam logic [R-1:0]  EX_ROW_T     [EX_ROWS] = '{8'd3, 8'd6, 8'd7, 8'd7, 8'd9, 8'd1, 8'd3, 8'd9};
  // ... or code Z of the target OLC input (for CC driving the function decoder)
  localparam logic [ZW-1:0] EX_ROW_Z     [EX_ROWS] = '{3'd1, 3'd2, 3'd3, 3'd3, 3'd4, 3'd0, 3'd1, 3'd4};

  // Function decoder contents: code Z -> address of the OLC input
  localparam logic [R-1:0]  EX_FD [2**ZW] = '{
    0: 8'd1,   // b2
    1: 8'd3,   // b4
    2: 8'd6,   // b7
    3: 8'd7,   // b8
    4: 8'd9,   // b10
    default: '0
  };

endpackage
