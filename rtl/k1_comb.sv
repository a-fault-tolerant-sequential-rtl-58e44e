// k1_comb: combinational part K1 of the fault-secure sequential circuit
// FSSC1.
//
// K1 computes the primary outputs y'1..y'm, their check outputs
// y'_{m+1}..y'_s and the next state z'1..z'p from the inputs x and the
// present state code z. It is a two-level AND-OR network that is monotone
// (has no inversion) in the state lines, which is what makes a single
// stuck-at fault show up as a unidirectional error at the outputs:
//   * there is one product term per STG transition (state i, input value v);
//     it ANDs only the state lines that are 1 in the code of state i (the
//     zeros of a constant-weight code word are treated as don't cares) with
//     the full input minterm x == v;
//   * each output line and each next-state line is the OR of the product
//     terms whose target code has a 1 in that position. The check outputs
//     are built the same way, from their own code bits, not by inverting
//     y'1..y'm.
// For a proper state code exactly one term per input value fires, so the
// outputs are an (h,s)-code word and the next state a (q,p)-code word.
// The product terms are kept in the named vector `prod` so a fault on any
// term is a fault on one gate output.
//
// The monotone encoding rule follows the architecture; the exact two-level
// structure is this design's own realization of it. Purely combinational.
module k1_comb
  import ft_pkg::*;
(
  input  in_t         x,     // x1..xn
  input  state_code_t z,     // present state from the d' flip-flops
  output out_code_t   y_o,   // y'1..y's (bit 0 = y'1)
  output state_code_t z_o    // z'1..z'p next state
);

  localparam int unsigned NUM_TERMS = NUM_STATES * NUM_IN_VAL;

  logic [NUM_TERMS-1:0] prod;

  // Product terms: state-code ones AND input minterm.
  always_comb begin
    for (int unsigned i = 0; i < NUM_STATES; i++) begin
      for (int unsigned v = 0; v < NUM_IN_VAL; v++) begin
        prod[i*NUM_IN_VAL + v] = ((z & state_code(i)) == state_code(i))
                                 && (x == in_t'(v));
      end
    end
  end

  // OR planes for outputs, check outputs and next state.
  always_comb begin
    y_o = '0;
    z_o = '0;
    for (int unsigned i = 0; i < NUM_STATES; i++) begin
      for (int unsigned v = 0; v < NUM_IN_VAL; v++) begin
        y_o = y_o | ({S_OUT{prod[i*NUM_IN_VAL + v]}} & out_code(stg_out(i, in_t'(v))));
        z_o = z_o | ({P_ST{prod[i*NUM_IN_VAL + v]}} & state_code(stg_next(i, in_t'(v))));
      end
    end
  end

endmodule
