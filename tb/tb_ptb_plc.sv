// tb_ptb_plc: end-to-end test of the product-term PLC.
//
// Two cores are programmed through their configuration chains with small
// user circuits built by hand, and then run on random inputs:
//
// Core A, every parameter at its default (2 levels of 5 and 3 PTBs, dual
// network):
//   po[0] = XOR of pi[7:0]: two level-1 PTBs form 4-input XORs, a level-2 PTB
//           combines them (two logic levels);
//   po[1] = pi[15], routed straight from input to output switch;
//   po[4:2] = 3-bit counter enabled by pi[8]: a level-1 PTB computes the next
//           state from its own registered outputs (dual-network feedback);
//   po[5] = the level-1 XOR of pi[3:0], registered (one clock late);
//   po[6] = constant 0 (select code 0);
//   po[7] = (pi[9] & pi[10]) | !pi[11].
// Core B, 3 levels of 4, 2 and 1 PTBs (triangular), 8 inputs, 4 outputs,
// global register array of 4 registers (decoupled):
//   po[2:0] = 3-bit counter enabled by pi[0]: the single level-3 PTB computes
//           the next state from register-array outputs, the array captures
//           it;
//   po[3] = (pi[1] & pi[2]) | pi[3], through levels 1 and 2.
// Expected values come from the functions themselves, computed here.
// Mechanisms counted (each must occur): configuration read back on cfg_out
// after exactly the chain length, two-level logic, input-to-output bypass,
// dual-network feedback, counter wrap, register array feedback, user state
// held across a reconfiguration, reset.
module tb_ptb_plc;
  import plc_tb_pkg::*;
  import ptb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic a_cfg_en = 0, a_cfg_in = 0, a_cfg_out;
  logic [15:0] a_pi = '0;
  logic [7:0]  a_po;
  logic b_cfg_en = 0, b_cfg_in = 0, b_cfg_out;
  logic [7:0] b_pi = '0;
  logic [3:0] b_po;

  int checks = 0, failures = 0;
  int n_readback = 0, n_twolevel = 0, n_bypass = 0, n_dualfb = 0, n_wrap = 0;
  int n_regarray = 0, n_hold = 0, n_reset = 0, n_threelevel = 0;

  ptb_plc dut_a (
    .clk, .rst_n, .cfg_en(a_cfg_en), .cfg_in(a_cfg_in), .cfg_out(a_cfg_out),
    .pi(a_pi), .po(a_po)
  );

  ptb_plc #(
    .N_IN(8), .N_OUT(4), .LEVELS(3), .NPTB('{4, 2, 1, 0, 0, 0, 0, 0}),
    .SEQ_MODE(SEQ_DECOUPLED), .N_REG(4)
  ) dut_b (
    .clk, .rst_n, .cfg_en(b_cfg_en), .cfg_in(b_cfg_in), .cfg_out(b_cfg_out),
    .pi(b_pi), .po(b_po)
  );

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Program a PTB output as a 3-bit counter next-state function. Inputs:
  // j_en (enable), j_q0..j_q2 (current state); outputs 0..2 = next state.
  function automatic void counter_ptb(plc_prog c, int l, int k, int j_en, int j_q0);
    int q0 = j_q0, q1 = j_q0 + 1, q2 = j_q0 + 2;
    // q0' = q0 ^ en
    c.set_lit(l, k, 0, j_en, 0); c.set_lit(l, k, 0, q0, 1); c.set_or(l, k, 0, 0);
    c.set_lit(l, k, 1, j_en, 1); c.set_lit(l, k, 1, q0, 0); c.set_or(l, k, 0, 1);
    // q1' = q1 ^ (en & q0)
    c.set_lit(l, k, 2, j_en, 1); c.set_lit(l, k, 2, q1, 0); c.set_or(l, k, 1, 2);
    c.set_lit(l, k, 3, q0, 1);   c.set_lit(l, k, 3, q1, 0); c.set_or(l, k, 1, 3);
    c.set_lit(l, k, 4, j_en, 0); c.set_lit(l, k, 4, q0, 0); c.set_lit(l, k, 4, q1, 1);
    c.set_or(l, k, 1, 4);
    // q2' = q2 ^ (en & q0 & q1)
    c.set_lit(l, k, 5, j_en, 1); c.set_lit(l, k, 5, q2, 0); c.set_or(l, k, 2, 5);
    c.set_lit(l, k, 6, q0, 1);   c.set_lit(l, k, 6, q2, 0); c.set_or(l, k, 2, 6);
    c.set_lit(l, k, 7, q1, 1);   c.set_lit(l, k, 7, q2, 0); c.set_or(l, k, 2, 7);
    c.set_lit(l, k, 8, j_en, 0); c.set_lit(l, k, 8, q0, 0); c.set_lit(l, k, 8, q1, 0);
    c.set_lit(l, k, 8, q2, 1);   c.set_or(l, k, 2, 8);
  endfunction

  // 4-input XOR of PTB inputs 0..3 on output 0 (8 product terms).
  function automatic void xor4_ptb(plc_prog c, int l, int k);
    int t = 0;
    for (int m = 0; m < 16; m++) begin
      if ($countones(4'(m)) % 2 == 1) begin
        for (int j = 0; j < 4; j++) c.set_lit(l, k, t, j, !m[j]);
        c.set_or(l, k, 0, t);
        t++;
      end
    end
  endfunction

  // Shift a bitstream into core A or B. Checks on cfg_out that the previous
  // bitstream leaves the chain in order (bit n after n shifts). Call right
  // after a falling clock edge; returns right after one.
  task automatic load_a(plc_prog c, bit prev[]);
    a_cfg_en = 1;
    for (int n = 0; n < c.total; n++) begin
      a_cfg_in = c.bits[n];
      if (prev.size() == c.total) begin
        checks++;
        if (a_cfg_out !== prev[n]) fail($sformatf("A readback bit %0d", n));
      end
      @(negedge clk);
    end
    a_cfg_en = 0;
    if (prev.size() == c.total) n_readback++;
  endtask

  task automatic load_b(plc_prog c, bit prev[]);
    b_cfg_en = 1;
    for (int n = 0; n < c.total; n++) begin
      b_cfg_in = c.bits[n];
      if (prev.size() == c.total) begin
        checks++;
        if (b_cfg_out !== prev[n]) fail($sformatf("B readback bit %0d", n));
      end
      @(negedge clk);
    end
    b_cfg_en = 0;
    if (prev.size() == c.total) n_readback++;
  endtask

  initial begin
    automatic plc_prog ca = new(16, 8, '{5, 3}, 10, 12, 3, 1, 8);
    automatic plc_prog cb = new(8, 4, '{4, 2, 1}, 10, 12, 3, 2, 4);
    automatic bit none[];
    int cnt_a, cnt_b;
    logic xlo_d;

    // ---- Core A configuration ----
    for (int j = 0; j < 4; j++) begin
      ca.route(0, 0, j, ca.c_pi(j));
      ca.route(0, 1, j, ca.c_pi(4 + j));
    end
    xor4_ptb(ca, 0, 0);
    xor4_ptb(ca, 0, 1);
    // Level-2 PTB 0: inputs 0, 1 from the level-1 XORs, XOR them.
    ca.route(1, 0, 0, ca.c_ptb(0, 0, 0));
    ca.route(1, 0, 1, ca.c_ptb(0, 1, 0));
    ca.set_lit(1, 0, 0, 0, 0); ca.set_lit(1, 0, 0, 1, 1); ca.set_or(1, 0, 0, 0);
    ca.set_lit(1, 0, 1, 0, 1); ca.set_lit(1, 0, 1, 1, 0); ca.set_or(1, 0, 0, 1);
    // Level-1 PTB 2: counter on its own registered outputs.
    ca.route(0, 2, 0, ca.c_pi(8));
    for (int q = 0; q < 3; q++) ca.route(0, 2, 1 + q, ca.c_ff(0, 2, q));
    counter_ptb(ca, 0, 2, 0, 1);
    // Level-1 PTB 3: (pi9 & pi10) | !pi11.
    ca.route(0, 3, 0, ca.c_pi(9));
    ca.route(0, 3, 1, ca.c_pi(10));
    ca.route(0, 3, 2, ca.c_pi(11));
    ca.set_lit(0, 3, 0, 0, 0); ca.set_lit(0, 3, 0, 1, 0); ca.set_or(0, 3, 0, 0);
    ca.set_lit(0, 3, 1, 2, 1); ca.set_or(0, 3, 0, 1);
    // Output switch.
    ca.set_sw(2, 0, ca.c_ptb(1, 0, 0));
    ca.set_sw(2, 1, ca.c_pi(15));
    for (int q = 0; q < 3; q++) ca.set_sw(2, 2 + q, ca.c_ff(0, 2, q));
    ca.set_sw(2, 5, ca.c_ff(0, 0, 0));
    ca.set_sw(2, 6, 0);
    ca.set_sw(2, 7, ca.c_ptb(0, 3, 0));

    // ---- Core B configuration ----
    // Level-3 PTB: counter from register-array outputs 0..2, enable pi[0].
    cb.route(2, 0, 0, cb.c_pi(0));
    for (int q = 0; q < 3; q++) cb.route(2, 0, 1 + q, cb.c_reg(q));
    counter_ptb(cb, 2, 0, 0, 1);
    for (int q = 0; q < 3; q++) cb.set_reg(q, cb.r_ptb(2, 0, q));
    // Level 1 PTB 1: pi1 & pi2. Level 2 PTB 1: that | pi3.
    cb.route(0, 1, 0, cb.c_pi(1));
    cb.route(0, 1, 1, cb.c_pi(2));
    cb.set_lit(0, 1, 0, 0, 0); cb.set_lit(0, 1, 0, 1, 0); cb.set_or(0, 1, 0, 0);
    cb.route(1, 1, 0, cb.c_ptb(0, 1, 0));
    cb.route(1, 1, 1, cb.c_pi(3));
    cb.set_lit(1, 1, 0, 0, 0); cb.set_or(1, 1, 0, 0);
    cb.set_lit(1, 1, 1, 1, 0); cb.set_or(1, 1, 0, 1);
    for (int q = 0; q < 3; q++) cb.set_sw(3, q, cb.c_reg(q));
    cb.set_sw(3, 3, cb.c_ptb(1, 1, 0));

    // ---- Reset: everything reads 0 ----
    a_pi = '1; b_pi = '1;
    repeat (3) @(negedge clk);
    checks++;
    if (a_po !== '0 || b_po !== '0) fail("outputs not 0 in reset");
    else n_reset++;
    rst_n = 1;
    a_pi = '0; b_pi = '0;

    // Configure both cores (A twice: the second pass reads the first back).
    fork
      begin load_a(ca, none); load_a(ca, ca.bits); end
      begin load_b(cb, none); load_b(cb, cb.bits); end
    join
    checks++;
    if (a_po[4:2] !== 3'd0 || b_po[2:0] !== 3'd0) fail("counters not 0 after configuration");

    cnt_a = 0; cnt_b = 0;
    xlo_d = 0;
    for (int n = 0; n < 400; n++) begin
      a_pi = 16'($urandom);
      b_pi = 8'($urandom);
      // Mid-run reconfiguration of core A with the same bitstream: the
      // counter must keep its value across it.
      if (n == 200) begin
        automatic logic [2:0] cnt_held = 3'(cnt_a);
        load_a(ca, ca.bits);
        checks++;
        if (a_po[4:2] !== cnt_held) fail("A counter lost across reconfiguration");
        else n_hold++;
      end
      #1;
      checks += 6;
      if (a_po[0] !== ^a_pi[7:0]) fail("A parity");
      else if (a_pi[3:0] != 0 && a_pi[7:4] != 0) n_twolevel++;
      if (a_po[1] !== a_pi[15]) fail("A bypass"); else n_bypass++;
      if (a_po[4:2] !== 3'(cnt_a)) fail($sformatf("A counter %0d expected %0d", a_po[4:2], cnt_a));
      else n_dualfb++;
      if (a_po[5] !== xlo_d) fail("A registered XOR");
      if (a_po[6] !== 1'b0) fail("A constant 0");
      if (a_po[7] !== ((a_pi[9] & a_pi[10]) | ~a_pi[11])) fail("A po7");
      checks += 2;
      if (b_po[2:0] !== 3'(cnt_b)) fail($sformatf("B counter %0d expected %0d", b_po[2:0], cnt_b));
      else n_regarray++;
      if (b_po[3] !== ((b_pi[1] & b_pi[2]) | b_pi[3])) fail("B po3");
      else n_threelevel++;
      @(posedge clk);
      if (a_pi[8]) begin
        if (cnt_a == 7) n_wrap++;
        cnt_a = (cnt_a + 1) % 8;
      end
      if (b_pi[0]) cnt_b = (cnt_b + 1) % 8;
      xlo_d = ^a_pi[3:0];
      @(negedge clk);
    end

    // Reset clears user state.
    rst_n = 0;
    #1;
    checks++;
    if (a_po[4:2] !== 3'd0 || b_po[2:0] !== 3'd0) fail("counters not cleared by reset");
    else n_reset++;

    $display("mechanisms: readback=%0d two_level=%0d bypass=%0d dual_feedback=%0d wrap=%0d",
             n_readback, n_twolevel, n_bypass, n_dualfb, n_wrap);
    $display("            reg_array=%0d three_level=%0d hold_across_reconfig=%0d reset=%0d",
             n_regarray, n_threelevel, n_hold, n_reset);
    checks++;
    if (n_readback == 0 || n_twolevel == 0 || n_bypass == 0 || n_dualfb == 0 ||
        n_wrap == 0 || n_regarray == 0 || n_threelevel == 0 || n_hold == 0 ||
        n_reset < 2) fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
