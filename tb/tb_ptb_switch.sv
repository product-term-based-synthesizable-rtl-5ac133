// tb_ptb_switch: self-checking test of an interconnect switch with 13
// sources and 6 destinations (4-bit select codes, so codes 14 and 15 are
// unused and must give 0). Loads random select codes through the serial
// port, applies random source vectors and checks each destination against
// the source its code names (code 0 and out-of-range codes give 0).
module tb_ptb_switch;
  localparam int N_SRC = 13, N_DST = 6, SW = 4;
  localparam int CFG_W = N_DST * SW;

  logic clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0;
  logic cfg_out;
  logic [N_SRC-1:0] src = '0;
  logic [N_DST-1:0] dst;
  int checks = 0, failures = 0;
  int code[N_DST];
  int seen_zero = 0, seen_over = 0;

  ptb_switch #(.N_SRC(N_SRC), .N_DST(N_DST)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load();
    bit stream[CFG_W];
    for (int d = 0; d < N_DST; d++)
      for (int b = 0; b < SW; b++) stream[d*SW + b] = code[d][b];
    @(negedge clk);
    cfg_en = 1;
    for (int n = 0; n < CFG_W; n++) begin
      cfg_in = stream[n];
      @(negedge clk);
    end
    cfg_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    src = '1;
    #1;
    checks++;
    if (dst !== '0) begin failures++; $display("FAIL reset: dst=%b", dst); end
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      foreach (code[d]) code[d] = $urandom_range(15, 0);
      if (r == 0) foreach (code[d]) code[d] = d + 1;
      load();
      foreach (code[d]) begin
        if (code[d] == 0) seen_zero++;
        if (code[d] > N_SRC) seen_over++;
      end
      for (int n = 0; n < 40; n++) begin
        src = N_SRC'($urandom);
        #1;
        for (int d = 0; d < N_DST; d++) begin
          automatic logic e = (code[d] >= 1 && code[d] <= N_SRC) ? src[code[d] - 1] : 1'b0;
          checks++;
          if (dst[d] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL dst[%0d] code %0d src=%b got %b", d, code[d], src, dst[d]);
          end
        end
      end
    end
    checks++;
    if (seen_zero == 0 || seen_over == 0) begin
      failures++;
      $display("FAIL constant-0 or unused select codes never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
