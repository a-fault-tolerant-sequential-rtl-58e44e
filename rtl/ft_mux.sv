// ft_mux: output and next-state multiplexer MUX of the fault-tolerant scheme.
//
// When the checker outputs u1u2 are 2'b10 (FSSC1 produced a code word) the
// lines a = {z'1..z'p, y'1..y'm} of FSSC1 are connected to the outputs o;
// for any other checker value the lines b = {z''1..z''p, y''1..y''m} of SC2
// are. The control value is decoded once into a per-line select vector
// sel_a, so a fault on the select of one line moves only that line to the
// other source, which is the multiplexer fault the scheme tolerates.
// Selection rule from the architecture; per-line select is this design's
// structure. Purely combinational.
module ft_mux
  import ft_pkg::*;
#(
  parameter int unsigned WIDTH = 7
) (
  input  logic [1:0]       u,   // checker outputs, u1 = bit 1
  input  logic [WIDTH-1:0] a,   // from FSSC1
  input  logic [WIDTH-1:0] b,   // from SC2
  output logic [WIDTH-1:0] o
);

  logic [WIDTH-1:0] sel_a;

  assign sel_a = {WIDTH{u == U_CODE}};
  assign o     = (sel_a & a) | (~sel_a & b);

endmodule
