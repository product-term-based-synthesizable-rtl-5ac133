// tb_ptb: self-checking test of the product-term block at its default size
// (10 inputs, 12 product terms, 3 outputs). Each round loads a random
// configuration through the serial port (checking on cfg_out that the
// previous one comes back out after exactly CFG_W shifts), then applies
// random inputs and compares every output with a sum-of-products evaluated in
// the testbench from the same random choices. Also checks a few hand-written
// functions (XOR of 4 inputs, an AND with complemented literals) and the
// constant-0 output after reset.
module tb_ptb;
  localparam int I = 10, P = 12, O = 3;
  localparam int CFG_W = 2 * I * P + P * O;

  logic clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0;
  logic cfg_out;
  logic [I-1:0] din = '0;
  logic [O-1:0] dout;
  int checks = 0, failures = 0;

  bit lt[P][I], lc[P][I], orb[O][P];
  bit stream[CFG_W], prev[CFG_W];

  ptb dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [O-1:0] model_sop(logic [I-1:0] x);
    logic [O-1:0] r = '0;
    for (int t = 0; t < P; t++) begin
      bit term = 1;
      for (int j = 0; j < I; j++) begin
        if (lt[t][j] && !x[j]) term = 0;
        if (lc[t][j] &&  x[j]) term = 0;
      end
      for (int k = 0; k < O; k++) if (orb[k][t] && term) r[k] = 1;
    end
    return r;
  endfunction

  // Build the stream from the tables: bit 0 is shifted in first and ends in
  // configuration bit 0.
  task automatic load();
    for (int t = 0; t < P; t++)
      for (int j = 0; j < I; j++) begin
        stream[t*2*I + 2*j]     = lt[t][j];
        stream[t*2*I + 2*j + 1] = lc[t][j];
      end
    for (int k = 0; k < O; k++)
      for (int t = 0; t < P; t++) stream[2*I*P + k*P + t] = orb[k][t];
    @(negedge clk);
    cfg_en = 1;
    for (int n = 0; n < CFG_W; n++) begin
      cfg_in = stream[n];
      checks++;
      if (cfg_out !== prev[n]) begin
        failures++;
        if (failures < 10) $display("FAIL readback bit %0d", n);
      end
      @(negedge clk);
    end
    cfg_en = 0;
    prev = stream;
  endtask

  task automatic apply(logic [I-1:0] x, logic [O-1:0] exp, string what);
    din = x;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: din=%b dout=%b expected %b", what, x, dout, exp);
    end
  endtask

  initial begin
    foreach (prev[n]) prev[n] = 0;
    repeat (2) @(negedge clk);
    apply(I'($urandom), '0, "after reset");
    rst_n = 1;
    // Hand-written: out0 = XOR(din[3:0]), out1 = din[5] & !din[6] & !din[9],
    // out2 = !din[0] (one term with a complement literal).
    foreach (lt[t, j]) begin lt[t][j] = 0; lc[t][j] = 0; end
    foreach (orb[k, t]) orb[k][t] = 0;
    for (int m = 0; m < 16; m++) begin
      if ($countones(m[3:0]) % 2 == 1) begin
        automatic int t = 0;
        for (int q = 0; q < 16; q++) if ($countones(q[3:0]) % 2 == 1 && q < m) t++;
        for (int j = 0; j < 4; j++) if (m[j]) lt[t][j] = 1; else lc[t][j] = 1;
        orb[0][t] = 1;
      end
    end
    lt[8][5] = 1; lc[8][6] = 1; lc[8][9] = 1; orb[1][8] = 1;
    lc[9][0] = 1; orb[2][9] = 1;
    load();
    for (int n = 0; n < 200; n++) begin
      automatic logic [I-1:0] x = I'($urandom);
      apply(x, {~x[0], x[5] & ~x[6] & ~x[9], ^x[3:0]}, "fixed functions");
    end
    // Random configurations against the model.
    for (int r = 0; r < 30; r++) begin
      foreach (lt[t, j]) begin
        lt[t][j] = ($urandom_range(4, 0) == 0);
        lc[t][j] = ($urandom_range(4, 0) == 0);
      end
      foreach (orb[k, t]) orb[k][t] = ($urandom_range(2, 0) == 0);
      load();
      for (int n = 0; n < 100; n++) begin
        automatic logic [I-1:0] x = I'($urandom);
        apply(x, model_sop(x), "random config");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
