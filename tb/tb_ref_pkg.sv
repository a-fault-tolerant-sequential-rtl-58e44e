// tb_ref_pkg: reference model for the testbenches, written independently of
// the RTL tables. The example FSM is a modulo-6 up/down counter: x[1] is
// enable, x[0] selects counting down; the output is the index of the next
// state. States are the six 2-out-of-4 words in increasing numeric order.
package tb_ref_pkg;

  localparam logic [3:0] REF_CODE [6] = '{4'h3, 4'h5, 4'h6, 4'h9, 4'hA, 4'hC};

  function automatic int ref_next(input int s, input logic [1:0] x);
    if (!x[1]) return s;
    if (x[0])  return (s + 5) % 6;
    return (s + 1) % 6;
  endfunction

  // Index of a proper state code, -1 for a non-code word.
  function automatic int ref_index(input logic [3:0] c);
    for (int i = 0; i < 6; i++) if (REF_CODE[i] == c) return i;
    return -1;
  endfunction

  function automatic int popcount(input logic [31:0] v);
    int n = 0;
    for (int i = 0; i < 32; i++) n += int'(v[i]);
    return n;
  endfunction

endpackage
