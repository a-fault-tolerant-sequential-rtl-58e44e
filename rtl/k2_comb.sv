// k2_comb: combinational part K2 of the unprotected sequential circuit SC2.
//
// K2 realizes the same next-state and output functions as K1 on every
// proper state code, but without check outputs and with a different
// structure, so that one fault is unlikely to hit both copies the same way.
// The present state code is compared in full (zeros included) against each
// state's code to give a binary state index; the STG is then read by index
// and input, and the next index is encoded back to its state code. A
// present state that is not a proper code word gives y'' = 0 and the code
// of state 0.
//
// That K2 is built differently from K1 follows the architecture's advice;
// the decode-lookup-encode structure is this design's choice.
// Purely combinational.
module k2_comb
  import ft_pkg::*;
(
  input  in_t         x,     // x1..xn
  input  state_code_t z,     // present state from the d'' flip-flops
  output out_t        y_o,   // y''1..y''m (bit 0 = y''1)
  output state_code_t z_o    // z''1..z''p next state
);

  state_idx_t idx;
  logic       idx_ok;
  state_idx_t nxt;

  // Exact decode of the present state code.
  always_comb begin
    idx    = '0;
    idx_ok = 1'b0;
    for (int unsigned i = 0; i < NUM_STATES; i++) begin
      if (z == state_code(i)) begin
        idx    = state_idx_t'(i);
        idx_ok = 1'b1;
      end
    end
  end

  // Table lookup and re-encoding.
  always_comb begin
    if (idx_ok) begin
      nxt = state_idx_t'(stg_next(int'(idx), x));
      y_o = stg_out(int'(idx), x);
    end else begin
      nxt = state_idx_t'(RESET_STATE);
      y_o = '0;
    end
    z_o = state_code(int'(nxt));
  end

endmodule
