// fssc1: fault-secure sequential circuit FSSC1.
//
// FSSC1 is the protected copy of the FSM: the monotone combinational part
// K1 (k1_comb) and the state flip-flops d'1..d'p. K1 reads the inputs x and
// the flip-flop contents and produces y'1..y's (primary outputs plus their
// check outputs) and the next state z'1..z'p. The flip-flops are not loaded
// from z' directly but from z_load, the next state chosen by the MUX, so
// that a corrupted FSSC1 state is replaced by SC2's correct one on the next
// clock edge.
// Timing: y_o and z_o are combinational in x and the present state; the
// state is loaded on the rising clock edge. rst_n (active low,
// asynchronous) sets the state to the code of the reset state; the reset
// is this design's choice.
module fssc1
  import ft_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  in_t         x,
  input  state_code_t z_load,  // z1..zp from the MUX
  output out_code_t   y_o,     // y'1..y's
  output state_code_t z_o      // z'1..z'p
);

  state_code_t state_q;        // flip-flops d'1..d'p

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= state_code(RESET_STATE);
    else        state_q <= z_load;
  end

  k1_comb u_k1 (
    .x   (x),
    .z   (state_q),
    .y_o (y_o),
    .z_o (z_o)
  );

endmodule
