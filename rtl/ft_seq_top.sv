// ft_seq_top: fault-tolerant synchronous sequential circuit.
//
// Two copies of one FSM run side by side. FSSC1 is fault-secure: under any
// single permissible fault its outputs y'1..y's form either the correct
// (h,s)-code word or a non-code word, and its next state z'1..z'p either
// the correct state code or one whose parity differs. SC2 is an ordinary,
// unprotected implementation. The XOR tree adds the parity of z' as bit
// y'_{s+1}; the checker Ch tests y'1..y'_{s+1} for the constant weight of a
// fault-free word and drives u1u2 = 10 when it holds. The MUX then passes
// FSSC1's outputs and next state, and otherwise SC2's. The selected next
// state z1..zp is loaded into both flip-flop banks, so after a transient
// fault both copies continue from the same correct state. Assuming one
// faulty module at a time, a fault in FSSC1 is caught by Ch and masked by
// SC2, and a fault in SC2, XOR, Ch or the MUX leaves FSSC1's correct word
// on the outputs or swaps it for SC2's equally correct one.
//
// Interface: x (n inputs) and y (m outputs), clk and asynchronous active-low
// rst_n. Timing: y is combinational in x and the present state (Mealy);
// the state advances on each rising clock edge.
// The block structure and the selection rule follow the architecture; the
// FSM, its codes and the reset are defined in ft_pkg and are this design's
// choices.
module ft_seq_top
  import ft_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  in_t  x,
  output out_t y
);

  out_code_t   y1;      // y'1..y's from FSSC1
  state_code_t z1;      // z'1..z'p from FSSC1
  out_t        y2;      // y''1..y''m from SC2
  state_code_t z2;      // z''1..z''p from SC2
  logic        par;     // y'_{s+1}
  logic [1:0]  u;       // checker outputs u1u2
  state_code_t z_sel;   // z1..zp from the MUX

  fssc1 u_fssc1 (
    .clk    (clk),
    .rst_n  (rst_n),
    .x      (x),
    .z_load (z_sel),
    .y_o    (y1),
    .z_o    (z1)
  );

  sc2 u_sc2 (
    .clk    (clk),
    .rst_n  (rst_n),
    .x      (x),
    .z_load (z_sel),
    .y_o    (y2),
    .z_o    (z2)
  );

  parity_xor #(.WIDTH(P_ST)) u_xor (
    .z     (z1),
    .par_o (par)
  );

  code_checker #(.WIDTH(CHK_LEN), .WEIGHT(CHK_W)) u_ch (
    .v ({par, y1}),
    .u (u)
  );

  ft_mux #(.WIDTH(MUX_W)) u_mux (
    .u (u),
    .a ({z1, y1[M_OUT-1:0]}),
    .b ({z2, y2}),
    .o ({z_sel, y})
  );

endmodule
