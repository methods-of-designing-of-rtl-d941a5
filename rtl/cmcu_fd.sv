// cmcu_fd: function decoder FD.
//
// In the function-decoder structures CC does not produce the counter load value T
// itself but the code Z of the OLC input to jump to, using only as many bits as the
// number of inputs needs. FD turns Z back into the address: T = f(Z). Following the
// CMCU method it is a memory (on an FPGA a dedicated memory block), here a ROM array of
// 2^ZW words of R bits. Its contents are the addresses of the OLC inputs; the default
// is the example flow-chart of cmcu_pkg.
//
// Read is asynchronous (combinational); a clocked read would add a cycle to every
// transition between chains and is this design's choice not to have.
module cmcu_fd
#(
  parameter int unsigned ZW = cmcu_pkg::ZW,
  parameter int unsigned R  = cmcu_pkg::R,
  parameter logic [R-1:0] INIT [2**ZW] = cmcu_pkg::EX_FD
) (
  input  logic [ZW-1:0] z,
  output logic [R-1:0]  t
);

  logic [R-1:0] rom [2**ZW];

  always_comb begin
    rom = INIT;
    t   = rom[z];
  end

endmodule
