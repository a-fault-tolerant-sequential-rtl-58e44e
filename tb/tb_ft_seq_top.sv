// tb_ft_seq_top: end-to-end test of the fault-tolerant sequential circuit at
// its default size, with transient faults injected one at a time.
//
// The FSM is run with random inputs against the reference counter model.
// In most cycles one module is made faulty for that one cycle, following
// the fault model the scheme is built for: only one module faulty at a
// time, each fault gone before the next appears. A fault is forced on the
// falling edge and released after the next rising edge; a flip-flop fault
// is released just before that edge so that the edge can reload the bank. Fault kinds:
//   PROD  one product term of K1 inverted (a stuck-at fault on a gate pole)
//   KOUT  one output or next-state line of K1 inverted
//   PDF   path delay fault: one K1 output line keeps last cycle's value
//   FF    one d' flip-flop of FSSC1 inverted
//   SC2   arbitrary values on all outputs of SC2
//   XOR   XOR output inverted
//   CH    arbitrary value on the checker outputs u1u2
//   MUX   arbitrary per-line selects inside the MUX
// A second phase of as many cycles injects intermittent faults: a fault
// episode keeps one fault site at one value for 2 to 5 consecutive cycles
// (a K1 product term or line stuck at 0 or 1, a d' flip-flop stuck, a K1
// line delayed every cycle, or a fixed wrong value on SC2, XOR, Ch or MUX),
// then the next episode starts, or a fault-free gap.
// In every cycle the primary outputs y and the next state z1..zp must equal
// the reference, whatever the fault. The testbench also counts how often
// each mechanism happened (an FSSC1 fault detected and masked by SC2, an
// SC2 fault masked by FSSC1, a PDF that actually changed a line, counter
// wrap-around up and down, ...) and counts a failure for any that never did.
// Fault-free cycles must give u1u2 = 10 (no false alarm).
module tb_ft_seq_top;
  import tb_ref_pkg::*;

  typedef enum int {F_NONE, F_PROD, F_KOUT, F_PDF, F_FF, F_SC2, F_XOR, F_CH, F_MUX, F_NUM} fault_e;

  localparam int CYCLES = 20000;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] x;
  logic [2:0] y;
  int checks = 0, failures = 0;
  int cur;
  int cycles = 0;

  int n_inject   [F_NUM];
  int n_detected [F_NUM];  // cycles where the checker rejected FSSC1's word
  int n_pdf_manifest = 0;
  int n_wrap_up = 0, n_wrap_down = 0, n_hold = 0;

  // Previous-cycle values of the K1 lines, for the path delay model.
  logic [5:0] y1_prev, y1_now;
  logic [3:0] z1_prev, z1_now;

  // Values applied by force; static so that each force holds a constant.
  logic [23:0] fv_prod;
  logic [5:0]  fv_y1;
  logic [3:0]  fv_z1, fv_state, fv_z2;
  logic [2:0]  fv_y2;
  logic        fv_par;
  logic [1:0]  fv_u;
  logic [6:0]  fv_sel;

  // Current intermittent fault episode.
  fault_e      ep_kind = F_NONE;
  int          ep_left = 0;
  int          ep_site;
  logic        ep_val;
  logic [1:0]  ep_u;
  logic [6:0]  ep_sel;
  logic [2:0]  ep_y2;
  logic [3:0]  ep_z2;
  int          n_episodes = 0;
  int          n_int_cycles   [F_NUM];
  int          n_int_manifest [F_NUM];  // cycles where the stuck value differed from the fault-free one
  int          n_int_detected [F_NUM];  // of those, cycles the checker rejected FSSC1's word
  bit          manifest;

  ft_seq_top dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (2 * CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: cycle %0d state %0d x=%b y=%b u=%b", what, cycles, cur, x, y, dut.u);
    end
  endtask

  task automatic inject(input fault_e f);
    int k;
    case (f)
      F_PROD: begin
        k = $urandom_range(0, 23);
        fv_prod = dut.u_fssc1.u_k1.prod ^ (24'd1 << k);
        force dut.u_fssc1.u_k1.prod = fv_prod;
      end
      F_KOUT: begin
        k = $urandom_range(0, 9);
        if (k < 6) begin
          fv_y1 = dut.y1 ^ (6'd1 << k);
          force dut.y1 = fv_y1;
        end else begin
          fv_z1 = dut.z1 ^ (4'd1 << (k - 6));
          force dut.z1 = fv_z1;
        end
      end
      F_PDF: begin
        logic [9:0] diff;
        diff = {z1_now, y1_now} ^ {z1_prev, y1_prev};
        k = $urandom_range(0, 9);
        // A delayed transition shows only on a line that should change.
        for (int j = 0; j < 10; j++) if (diff[(k + j) % 10]) begin k = (k + j) % 10; break; end
        if (diff[k]) n_pdf_manifest++;
        if (k < 6) begin
          fv_y1 = y1_now;
          fv_y1[k] = y1_prev[k];
          force dut.y1 = fv_y1;
        end else begin
          fv_z1 = z1_now;
          fv_z1[k-6] = z1_prev[k-6];
          force dut.z1 = fv_z1;
        end
      end
      F_FF: begin
        k = $urandom_range(0, 3);
        fv_state = dut.u_fssc1.state_q ^ (4'd1 << k);
        force dut.u_fssc1.state_q = fv_state;
      end
      F_SC2: begin
        fv_y2 = 3'($urandom);
        fv_z2 = 4'($urandom);
        force dut.y2 = fv_y2;
        force dut.z2 = fv_z2;
      end
      F_XOR: begin
        fv_par = ~dut.par;
        force dut.par = fv_par;
      end
      F_CH: begin
        fv_u = 2'($urandom_range(0, 3));
        force dut.u = fv_u;
      end
      F_MUX: begin
        fv_sel = 7'($urandom);
        force dut.u_mux.sel_a = fv_sel;
      end
      default: ;
    endcase
  endtask

  // Intermittent fault: apply the current episode's fault for this cycle
  // and set `manifest` when it differs from the fault-free value.
  task automatic inject_stuck(input fault_e f);
    manifest = 1'b0;
    case (f)
      F_PROD: begin
        fv_prod = dut.u_fssc1.u_k1.prod;
        manifest = fv_prod[ep_site % 24] != ep_val;
        fv_prod[ep_site % 24] = ep_val;
        force dut.u_fssc1.u_k1.prod = fv_prod;
      end
      F_KOUT: begin
        if (ep_site % 10 < 6) begin
          fv_y1 = dut.y1;
          manifest = fv_y1[ep_site % 10] != ep_val;
          fv_y1[ep_site % 10] = ep_val;
          force dut.y1 = fv_y1;
        end else begin
          fv_z1 = dut.z1;
          manifest = fv_z1[ep_site % 10 - 6] != ep_val;
          fv_z1[ep_site % 10 - 6] = ep_val;
          force dut.z1 = fv_z1;
        end
      end
      F_PDF: begin
        if (ep_site % 10 < 6) begin
          fv_y1 = y1_now;
          manifest = y1_now[ep_site % 10] != y1_prev[ep_site % 10];
          fv_y1[ep_site % 10] = y1_prev[ep_site % 10];
          force dut.y1 = fv_y1;
        end else begin
          fv_z1 = z1_now;
          manifest = z1_now[ep_site % 10 - 6] != z1_prev[ep_site % 10 - 6];
          fv_z1[ep_site % 10 - 6] = z1_prev[ep_site % 10 - 6];
          force dut.z1 = fv_z1;
        end
      end
      F_FF: begin
        fv_state = dut.u_fssc1.state_q;
        manifest = fv_state[ep_site % 4] != ep_val;
        fv_state[ep_site % 4] = ep_val;
        force dut.u_fssc1.state_q = fv_state;
      end
      F_SC2: begin
        manifest = (dut.y2 != ep_y2) || (dut.z2 != ep_z2);
        fv_y2 = ep_y2;
        fv_z2 = ep_z2;
        force dut.y2 = fv_y2;
        force dut.z2 = fv_z2;
      end
      F_XOR: begin
        manifest = dut.par != ep_val;
        fv_par = ep_val;
        force dut.par = fv_par;
      end
      F_CH: begin
        manifest = dut.u != ep_u;
        fv_u = ep_u;
        force dut.u = fv_u;
      end
      F_MUX: begin
        manifest = ep_sel != '1;
        fv_sel = ep_sel;
        force dut.u_mux.sel_a = fv_sel;
      end
      default: ;
    endcase
  endtask

  task automatic release_all();
    release dut.u_fssc1.u_k1.prod;
    release dut.y1;
    release dut.z1;
    release dut.y2;
    release dut.z2;
    release dut.par;
    release dut.u;
    release dut.u_mux.sel_a;
  endtask

  initial begin
    foreach (n_inject[i]) begin
      n_inject[i] = 0; n_detected[i] = 0;
      n_int_cycles[i] = 0; n_int_manifest[i] = 0; n_int_detected[i] = 0;
    end
    rst_n = 1'b0;
    x     = 2'b00;
    cur   = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    y1_now = dut.y1;
    z1_now = dut.z1;
    for (int i = 0; i < 2 * CYCLES; i++) begin
      int     n;
      fault_e f;
      bit     intermittent;
      intermittent = (i >= CYCLES);
      x = 2'($urandom_range(0, 3));
      #1;
      n = ref_next(cur, x);
      if (intermittent) begin
        if (ep_left == 0) begin
          ep_kind = fault_e'($urandom_range(0, F_NUM - 1));
          ep_left = $urandom_range(2, 5);
          ep_site = $urandom_range(0, 239);
          ep_val  = 1'($urandom);
          ep_u    = 2'($urandom);
          ep_sel  = 7'($urandom);
          ep_y2   = 3'($urandom);
          ep_z2   = 4'($urandom);
          if (ep_kind != F_NONE) n_episodes++;
        end
        ep_left--;
        f = ep_kind;
      end else begin
        f = ($urandom_range(0, 3) == 0) ? F_NONE : fault_e'($urandom_range(1, F_NUM - 1));
      end
      // Fault-free view of K1 now and one cycle ago, for the path delay model.
      y1_prev = y1_now;
      z1_prev = z1_now;
      y1_now  = dut.y1;
      z1_now  = dut.z1;
      if (intermittent) inject_stuck(f);
      else              inject(f);
      #1;
      if (intermittent) begin
        n_int_cycles[f]++;
        if (manifest) begin
          n_int_manifest[f]++;
          if (dut.u != 2'b10) n_int_detected[f]++;
          // A stuck K1 line, flip-flop or delayed line that shows must be caught.
          if (f inside {F_KOUT, F_PDF, F_FF, F_XOR})
            check(dut.u != 2'b10, "intermittent FSSC1 or XOR fault not caught");
        end
      end else begin
        n_inject[f]++;
        if (dut.u != 2'b10) n_detected[f]++;
      end
      if (f == F_NONE || f == F_SC2) check(dut.u == 2'b10, "checker raised without an FSSC1 fault");
      check(y == 3'(n), "primary outputs");
      check(dut.z_sel == REF_CODE[n], "next state");
      if (x[1] && !x[0] && cur == 5) n_wrap_up++;
      if (x[1] &&  x[0] && cur == 0) n_wrap_down++;
      if (!x[1]) n_hold++;
      // A released variable keeps its forced value until it is next
      // written, so the flip-flop fault is released before the clock edge
      // that reloads the bank.
      #2;
      release dut.u_fssc1.state_q;
      @(posedge clk);
      #1;
      release_all();
      cycles++;
      cur = n;
      check(dut.u_fssc1.state_q == REF_CODE[cur] && dut.u_sc2.state_q == REF_CODE[cur],
            "both flip-flop banks hold the correct state");
      @(negedge clk);
    end

    // Every mechanism must have happened.
    for (int f = 1; f < F_NUM; f++) begin
      checks++;
      if (n_inject[f] == 0) begin failures++; $display("FAIL fault kind %0d never injected", f); end
    end
    // FSSC1 faults must have been caught by the checker (switch to SC2).
    checks += 4;
    if (n_detected[F_PROD] == 0) begin failures++; $display("FAIL no K1 product fault detected"); end
    if (n_detected[F_KOUT] == 0) begin failures++; $display("FAIL no K1 line fault detected"); end
    if (n_detected[F_PDF]  == 0) begin failures++; $display("FAIL no path delay fault detected"); end
    if (n_detected[F_FF]   == 0) begin failures++; $display("FAIL no flip-flop fault detected"); end
    // A line inversion on K1 always changes the weight of the checked word.
    checks++;
    if (n_detected[F_KOUT] != n_inject[F_KOUT]) begin
      failures++; $display("FAIL K1 line faults: %0d of %0d detected", n_detected[F_KOUT], n_inject[F_KOUT]);
    end
    // Every delay fault that changed a line, and every flip-flop inversion,
    // must have been caught.
    checks += 2;
    if (n_detected[F_PDF] != n_pdf_manifest) begin
      failures++; $display("FAIL path delay faults: %0d of %0d caught", n_detected[F_PDF], n_pdf_manifest);
    end
    if (n_detected[F_FF] != n_inject[F_FF]) begin
      failures++; $display("FAIL flip-flop faults: %0d of %0d caught", n_detected[F_FF], n_inject[F_FF]);
    end
    // XOR faults always make a non-code word; SC2 faults never do.
    checks += 2;
    if (n_detected[F_XOR] != n_inject[F_XOR]) begin failures++; $display("FAIL XOR fault not flagged"); end
    if (n_detected[F_SC2] != 0) begin failures++; $display("FAIL SC2 fault flagged"); end
    checks += 4;
    if (n_pdf_manifest == 0) begin failures++; $display("FAIL no path delay fault manifested"); end
    if (n_wrap_up == 0)      begin failures++; $display("FAIL no wrap-around up"); end
    if (n_wrap_down == 0)    begin failures++; $display("FAIL no wrap-around down"); end
    if (n_hold == 0)         begin failures++; $display("FAIL no hold cycle"); end

    // Every intermittent fault kind must have shown at least once.
    for (int f = 1; f < F_NUM; f++) begin
      checks++;
      if (n_int_manifest[f] == 0) begin
        failures++; $display("FAIL intermittent fault kind %0d never manifested", f);
      end
    end

    $display("transient faults, kind : injected / checker switched to SC2");
    for (int f = 0; f < F_NUM; f++)
      $display("  %-6s : %0d / %0d", fault_e'(f), n_inject[f], n_detected[f]);
    $display("path delay faults that changed a line: %0d", n_pdf_manifest);
    $display("intermittent faults, %0d episodes; kind : cycles / manifested / checker switched", n_episodes);
    for (int f = 0; f < F_NUM; f++)
      $display("  %-6s : %0d / %0d / %0d", fault_e'(f), n_int_cycles[f], n_int_manifest[f], n_int_detected[f]);
    $display("wrap up %0d, wrap down %0d, hold %0d", n_wrap_up, n_wrap_down, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
