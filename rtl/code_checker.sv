// code_checker: checker Ch for a constant-weight (WEIGHT, WIDTH)-code.
//
// Ch observes y'1..y's and the state parity y'_{s+1}. Its two outputs u1,u2
// are 2'b10 (u1 = bit 1) when exactly WEIGHT of the WIDTH inputs are 1,
// which is the case for every fault-free word, and 2'b01 otherwise.
// A unidirectional error on the outputs, or a parity change of the next
// state, always changes the weight and is therefore flagged.
// The code, its weight rule and the meaning of "10" follow the architecture;
// the architecture allows any checker, not necessarily self-testing, and
// this one is a population count compared with WEIGHT, with 2'b01 chosen
// as the non-code value. Purely combinational.
module code_checker
  import ft_pkg::*;
#(
  parameter int unsigned WIDTH  = 7,
  parameter int unsigned WEIGHT = 3
) (
  input  logic [WIDTH-1:0] v,
  output logic [1:0]       u
);

  logic [$clog2(WIDTH+1)-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      ones = ones + $bits(ones)'(v[i]);
    end
    u = (ones == $bits(ones)'(WEIGHT)) ? U_CODE : U_NONCODE;
  end

endmodule
