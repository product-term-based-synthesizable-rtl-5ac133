// tb_ptb_reg_array: self-checking test of the global register array with
// 10 sources and 5 registers. Loads random input selections, then clocks
// random source vectors and checks that each register holds, one clock
// later, the source its code names; checks that the registers hold while a
// configuration is being shifted in and that reset clears them.
module tb_ptb_reg_array;
  localparam int N_SRC = 10, N_REG = 5, SW = 4;
  localparam int CFG_W = N_REG * SW;

  logic clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0;
  logic cfg_out;
  logic [N_SRC-1:0] src = '0;
  logic [N_REG-1:0] q;
  logic [N_REG-1:0] exp_q;
  int checks = 0, failures = 0;
  int code[N_REG];

  ptb_reg_array #(.N_SRC(N_SRC), .N_REG(N_REG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what);
    checks++;
    if (q !== exp_q) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%b expected %b", what, q, exp_q);
    end
  endtask

  initial begin
    exp_q = '0;
    src = '1;
    repeat (3) @(negedge clk);
    chk("reset");
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      bit stream[CFG_W];
      logic [N_REG-1:0] held;
      foreach (code[k]) code[k] = $urandom_range(N_SRC, 0);
      for (int k = 0; k < N_REG; k++)
        for (int b = 0; b < SW; b++) stream[k*SW + b] = code[k][b];
      held = q;
      cfg_en = 1;
      for (int n = 0; n < CFG_W; n++) begin
        cfg_in = stream[n];
        src = N_SRC'($urandom);
        @(negedge clk);
      end
      cfg_en = 0;
      exp_q = held;
      chk("hold during configuration");
      for (int n = 0; n < 30; n++) begin
        src = N_SRC'($urandom);
        for (int k = 0; k < N_REG; k++)
          exp_q[k] = (code[k] >= 1 && code[k] <= N_SRC) ? src[code[k] - 1] : 1'b0;
        @(negedge clk);
        chk("capture");
      end
    end
    rst_n = 0;
    #1 exp_q = '0;
    chk("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
