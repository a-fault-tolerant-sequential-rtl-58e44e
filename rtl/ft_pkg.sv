// ft_pkg: sizes, codes and the state transition graph (STG) shared by the
// fault-tolerant sequential circuit.
//
// The architecture works for any synchronous FSM given as an STG. Which FSM
// is built is decided here and nowhere else: K1 and K2 are generated from
// the tables below. The FSM in this file is an example chosen for this
// design: a modulo-6 up/down counter with inputs x[1] = enable and
// x[0] = count down, and Mealy output y = binary index of the next state.
//
// Encodings, as the architecture requires:
//   * states use a constant-weight (q,p)-code, here 2-out-of-4 (q=2, p=4);
//     all six 2-out-of-4 words are used, one per state;
//   * the m primary outputs are extended with s-m check outputs so that
//     y'1..y's is an (h,s)-code word. Here the check outputs are the
//     complement of the primary outputs, giving a (3,6)-code;
//   * the checker sees y'1..y's plus the state parity y'_{s+1}, a word of
//     s+1 bits whose weight is h+1 when the state codes have odd weight and
//     h when they have even weight.
// The specific codes and the example FSM are this design's own choices.
package ft_pkg;

  localparam int unsigned N_IN       = 2;   // n: primary inputs
  localparam int unsigned M_OUT      = 3;   // m: primary outputs
  localparam int unsigned S_OUT      = 2 * M_OUT; // s: output code length
  localparam int unsigned H_W        = M_OUT;     // h: output code weight
  localparam int unsigned P_ST       = 4;   // p: state code length
  localparam int unsigned Q_W        = 2;   // q: state code weight
  localparam int unsigned NUM_STATES = 6;
  localparam int unsigned NUM_IN_VAL = 1 << N_IN;

  // Checker: s+1 inputs, weight h+1 for odd q, h for even q.
  localparam int unsigned CHK_LEN    = S_OUT + 1;
  localparam int unsigned CHK_W      = H_W + (Q_W % 2);

  // MUX data width: y1..ym followed by z1..zp.
  localparam int unsigned MUX_W      = M_OUT + P_ST;

  typedef logic [N_IN-1:0]  in_t;
  typedef logic [M_OUT-1:0] out_t;
  typedef logic [S_OUT-1:0] out_code_t;
  typedef logic [P_ST-1:0]  state_code_t;
  typedef logic [$clog2(NUM_STATES)-1:0] state_idx_t;

  // Checker outputs u1u2 = 2'b10 mark a code word; anything else is a
  // non-code indication.
  localparam logic [1:0] U_CODE    = 2'b10;
  localparam logic [1:0] U_NONCODE = 2'b01;

  // State codes, index = state number. Each word has exactly Q_W ones.
  function automatic state_code_t state_code(input int unsigned idx);
    case (idx)
      0:       return 4'b0011;
      1:       return 4'b0101;
      2:       return 4'b0110;
      3:       return 4'b1001;
      4:       return 4'b1010;
      5:       return 4'b1100;
      default: return 4'b0011;
    endcase
  endfunction

  localparam int unsigned RESET_STATE = 0;

  // STG of the example FSM: next state for present state idx and input xv.
  function automatic int unsigned stg_next(input int unsigned idx, input in_t xv);
    logic en, down;
    en   = xv[1];
    down = xv[0];
    if (!en)       return idx;
    else if (down) return (idx == 0) ? NUM_STATES - 1 : idx - 1;
    else           return (idx == NUM_STATES - 1) ? 0 : idx + 1;
  endfunction

  // Mealy output of the example FSM (primary outputs y1..ym).
  function automatic out_t stg_out(input int unsigned idx, input in_t xv);
    return out_t'(stg_next(idx, xv));
  endfunction

  // (h,s)-code word for a primary output symbol: outputs, then complements.
  function automatic out_code_t out_code(input out_t y);
    return {~y, y};
  endfunction

endpackage
