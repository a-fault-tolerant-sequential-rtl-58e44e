// tb_fssc1: clocked check of fssc1. The state flip-flops are loaded from
// z_load, which the testbench drives: mostly with the expected next state,
// sometimes with another proper state, to show the bank follows z_load and
// not its own next-state output. Every cycle y'1..y's (outputs and complement check bits) and the next
// state are compared with the reference model for the state last loaded.
// Reset must give state 0.
module tb_fssc1;
  import tb_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] x;
  logic [3:0] z_load;
  logic [5:0] y;
  logic [3:0] zn;
  int checks = 0, failures = 0;
  int cur;                      // state index the flip-flops should hold
  int cycles = 0;

  fssc1 dut (.clk(clk), .rst_n(rst_n), .x(x), .z_load(z_load), .y_o(y), .z_o(zn));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: cycle %0d state %0d x=%b y=%b zn=%b", what, cycles, cur, x, y, zn);
    end
  endtask

  initial begin
    rst_n  = 1'b0;
    x      = 2'b00;
    z_load = REF_CODE[3];
    cur    = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      int n;
      int ld;
      x = 2'($urandom_range(0, 3));
      #1;
      n = ref_next(cur, x);
      check(y == {~3'(n), 3'(n)}, "outputs");
      check(zn == REF_CODE[n], "next state");
      ld = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 5)) : n;
      z_load = REF_CODE[ld];
      @(posedge clk);
      cycles++;
      cur = ld;
      @(negedge clk);
    end
    // Asynchronous reset returns to state 0 without a clock edge.
    rst_n = 1'b0;
    x     = 2'b00;
    #1;
    check(zn == REF_CODE[0], "reset state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
