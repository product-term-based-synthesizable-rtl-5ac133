// tb_ptb_plc_full: the core at its default size (16 inputs, 8 outputs, two
// levels of 5 and 3 PTBs with 10 inputs, 12 product terms and 3 outputs,
// dual network) against a behavioural reference.
//
// Each round draws a random configuration (every switch select, literal and
// OR connection), shifts the complete bitstream in, and runs random inputs
// for a number of clocks, comparing every primary output before each clock
// edge with the reference model in plc_tb_pkg, which evaluates the same
// configuration from its tables and tracks the registered network itself.
// Between rounds the previous bitstream must come back out of cfg_out.
module tb_ptb_plc_full;
  import plc_tb_pkg::*;

  localparam int ROUNDS = 12, CYCLES = 150;

  logic clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic [15:0] pi = '0;
  logic [7:0]  po;
  int checks = 0, failures = 0;
  int ones = 0, seq_changes = 0;

  ptb_plc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic plc_prog c = new(16, 8, '{5, 3}, 10, 12, 3, 1, 8);
    automatic bit prev[] = new[c.total];
    automatic bit regs[] = new[c.n_regsig];
    bit pin[], pout[], comb[];
    pin = new[16];

    checks++;
    if (dut.CFG_BITS != c.total) begin
      failures++;
      $display("FAIL CFG_BITS=%0d, bitstream layout has %0d bits", dut.CFG_BITS, c.total);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROUNDS; r++) begin
      c.randomize_all();
      cfg_en = 1;
      for (int n = 0; n < c.total; n++) begin
        cfg_in = c.bits[n];
        checks++;
        if (cfg_out !== prev[n]) begin
          failures++;
          if (failures < 10) $display("FAIL round %0d readback bit %0d", r, n);
        end
        @(negedge clk);
      end
      cfg_en = 0;
      prev = c.bits;
      // The registered signals held their values while the bitstream was
      // shifted in, so the model carries its own copy over unchanged.
      for (int n = 0; n < CYCLES; n++) begin
        pi = 16'($urandom);
        foreach (pin[i]) pin[i] = pi[i];
        c.eval(pin, regs, pout, comb);
        #1;
        for (int d = 0; d < 8; d++) begin
          checks++;
          if (po[d] !== pout[d]) begin
            failures++;
            if (failures < 10) $display("FAIL round %0d cycle %0d po[%0d]=%b expected %b", r, n, d, po[d], pout[d]);
          end
          if (pout[d]) ones++;
        end
        foreach (regs[k]) if (regs[k] != comb[k]) seq_changes++;
        c.next_regs(comb, regs);
        @(negedge clk);
      end
    end
    $display("outputs at 1: %0d, register changes: %0d, bitstream length %0d", ones, seq_changes, c.total);
    checks++;
    if (ones == 0 || seq_changes == 0) begin
      failures++;
      $display("FAIL random configurations never exercised the outputs or registers");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
