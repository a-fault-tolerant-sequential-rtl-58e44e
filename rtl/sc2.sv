// sc2: unprotected sequential circuit SC2.
//
// SC2 realizes the same FSM with the same state codes as FSSC1 but without
// check outputs: the combinational part K2 (k2_comb) and the state
// flip-flops d''1..d''p. Its outputs y''1..y''m and next state z''1..z''p
// are used by the MUX whenever the checker rejects FSSC1's word. Like
// FSSC1, its flip-flops are loaded from the MUX output z_load.
// Timing: outputs combinational in x and the present state; state loaded
// on the rising clock edge; rst_n (active low, asynchronous) sets the code
// of the reset state, a choice of this design.
module sc2
  import ft_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  in_t         x,
  input  state_code_t z_load,  // z1..zp from the MUX
  output out_t        y_o,     // y''1..y''m
  output state_code_t z_o      // z''1..z''p
);

  state_code_t state_q;        // flip-flops d''1..d''p

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= state_code(RESET_STATE);
    else        state_q <= z_load;
  end

  k2_comb u_k2 (
    .x   (x),
    .z   (state_q),
    .y_o (y_o),
    .z_o (z_o)
  );

endmodule
