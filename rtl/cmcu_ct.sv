// cmcu_ct: counter CT with its fetch flip-flop.
//
// CT holds the address A of the current microinstruction. On start it is set to the
// address of the first microinstruction (A_START) and fetching begins. Then, once per
// clock, while fetching:
//   yk = 1 : the current microinstruction is the last one, fetching stops, A holds;
//   y0 = 1 : the transition stays inside the OLC, A <= A + 1 (natural addressing);
//   y0 = 0 : an OLC output was reached, A <= T, the value produced by CC (or FD).
// busy is the fetch flip-flop: high from the clock after start up to and including the
// cycle of the last microinstruction. start is ignored while busy.
//
// The increment/load behaviour is the CMCU method's; the fetch flip-flop is how this
// design realises "yk organises the fetching of microinstructions", and the
// asynchronous active-low reset (A = A_START, not fetching) is this design's choice.
module cmcu_ct
#(
  parameter int unsigned R = cmcu_pkg::R,
  parameter logic [R-1:0] A_START = cmcu_pkg::A_START
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         y0,
  input  logic         yk,
  input  logic [R-1:0] t,
  output logic [R-1:0] a,
  output logic         busy
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a    <= A_START;
      busy <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        a    <= A_START;
        busy <= 1'b1;
      end
    end else if (yk) begin
      busy <= 1'b0;
    end else if (y0) begin
      a <= a + 1'b1;
    end else begin
      a <= t;
    end
  end

endmodule
