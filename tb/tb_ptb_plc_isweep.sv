// tb_ptb_plc_isweep: the PTB input-count sweep i = 8 .. 15. Builds eight
// default-shaped cores (16 inputs, 8 outputs, levels of 5 and 3 PTBs, dual
// network), one per PTB input count, and runs each on random bitstreams and
// random inputs against the behavioural reference in plc_tb_pkg, checking
// the primary outputs before every clock edge and the bitstream read-back.
module tb_ptb_plc_isweep;
  import plc_tb_pkg::*;

  localparam int ROUNDS = 4, CYCLES = 60;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, done = 0;

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  for (genvar gi = 8; gi <= 15; gi++) begin : g_i
    logic cfg_en = 0, cfg_in = 0, cfg_out;
    logic [15:0] pi = '0;
    logic [7:0]  po;

    ptb_plc #(.PTB_I(gi)) dut (.*);

    initial begin
      automatic plc_prog c = new(16, 8, '{5, 3}, gi, 12, 3, 1, 8);
      automatic bit prev[] = new[c.total];
      automatic bit regs[] = new[c.n_regsig];
      bit pin[], pout[], comb[];
      pin = new[16];
      repeat (4) @(negedge clk);
      for (int r = 0; r < ROUNDS; r++) begin
        c.randomize_all();
        cfg_en = 1;
        for (int n = 0; n < c.total; n++) begin
          cfg_in = c.bits[n];
          checks++;
          if (cfg_out !== prev[n]) begin
            failures++;
            if (failures < 10) $display("FAIL i=%0d readback bit %0d", gi, n);
          end
          @(negedge clk);
        end
        cfg_en = 0;
        prev = c.bits;
        for (int n = 0; n < CYCLES; n++) begin
          pi = 16'($urandom);
          foreach (pin[k]) pin[k] = pi[k];
          c.eval(pin, regs, pout, comb);
          #1;
          for (int d = 0; d < 8; d++) begin
            checks++;
            if (po[d] !== pout[d]) begin
              failures++;
              if (failures < 10) $display("FAIL i=%0d po[%0d]", gi, d);
            end
          end
          c.next_regs(comb, regs);
          @(negedge clk);
        end
      end
      $display("i=%0d: bitstream %0d bits, done", gi, c.total);
      done++;
    end
  end

  initial begin
    wait (done == 8);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
