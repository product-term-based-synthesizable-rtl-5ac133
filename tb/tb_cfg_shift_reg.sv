// tb_cfg_shift_reg: self-checking test of one configuration-chain segment.
// Shifts random bits in and compares the parallel bits and the serial output
// with a model kept in the testbench, checks that the bits hold while cfg_en
// is low (one bit per clock while it is high) and that reset clears them.
module tb_cfg_shift_reg;
  localparam int W = 13;

  logic clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0;
  logic cfg_out;
  logic [W-1:0] q;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  cfg_shift_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== model || cfg_out !== model[0]) begin
      failures++;
      $display("FAIL %s: q=%h expected %h cfg_out=%b", what, q, model, cfg_out);
    end
  endtask

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    check("reset");
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      cfg_en = ($urandom_range(3, 0) != 0);
      cfg_in = $urandom_range(1, 0);
      @(posedge clk);
      if (cfg_en) model = {cfg_in, model[W-1:1]};
      #1 check(cfg_en ? "shift" : "hold");
    end
    // Chain latency: a marker entering now leaves cfg_out after W shifts.
    @(negedge clk);
    cfg_en = 1;
    for (int n = 0; n < W; n++) begin
      cfg_in = (n == 0);
      @(negedge clk);
    end
    checks++;
    if (cfg_out !== 1'b1) begin
      failures++;
      $display("FAIL marker not at cfg_out after %0d shifts", W);
    end
    cfg_en = 0;
    rst_n = 0;
    #1 model = '0;
    check("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
