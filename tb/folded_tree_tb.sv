// folded_tree_tb: self-checking test of the folded tree.
// Instance A has the default 8 inputs of 4 bits (4 PEs). It is given the
// worked example 3 1 2 0 4 1 1 3 (total 15, exclusive prefixes
// 0 3 4 6 6 10 11 12), all-maximum inputs, and random vectors in prefix
// mode, with the total checked 3 cycles and the prefixes 6 cycles after the
// start. In SAD mode it checks the sum of |X - Y| over the four pairs,
// including back-to-back operations. Instance B folds a 16-input tree onto
// 8 PEs (8-bit inputs) and is checked the same way, with latencies 4 and 8.
module folded_tree_tb;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // instance A: 8 x 4 bits
  localparam int unsigned NA = 8, DA = 4, OA = 7;
  logic           sa, sada, ra, tva, pva;
  logic [DA-1:0]  dina [NA];
  logic [OA-1:0]  tota, pfxa [NA];

  folded_tree dut_a (.clk, .rst_n, .start(sa), .sad_mode(sada), .din(dina), .ready(ra),
                     .total(tota), .total_valid(tva), .prefix(pfxa), .prefix_valid(pva));

  // instance B: 16 x 8 bits
  localparam int unsigned NB = 16, DB = 8, OB = 12;
  logic           sb, sadb, rb, tvb, pvb;
  logic [DB-1:0]  dinb [NB];
  logic [OB-1:0]  totb, pfxb [NB];

  folded_tree #(.N(NB), .DW(DB)) dut_b (.clk, .rst_n, .start(sb), .sad_mode(sadb), .din(dinb),
                     .ready(rb), .total(totb), .total_valid(tvb), .prefix(pfxb), .prefix_valid(pvb));

  task automatic check(input string what, input int got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t: %s = %0d, expected %0d", $time, what, got, exp);
    end
  endtask

  // One prefix operation on instance A; checks latency, total and prefixes.
  task automatic run_a_prefix(input int v [NA]);
    int sum, lat;
    sum = 0;
    for (int i = 0; i < int'(NA); i++) dina[i] = DA'(v[i]);
    sa = 1'b1; sada = 1'b0;
    @(posedge clk); #1 sa = 1'b0;
    lat = 1;
    while (!tva && lat < 20) begin @(posedge clk); #1 lat++; end
    check("A total latency", lat, 3);
    for (int i = 0; i < int'(NA); i++) sum += v[i];
    check("A total", int'(tota), sum);
    while (!pva && lat < 20) begin @(posedge clk); #1 lat++; end
    check("A prefix latency", lat, 6);
    sum = 0;
    for (int i = 0; i < int'(NA); i++) begin
      check($sformatf("A prefix[%0d]", i), int'(pfxa[i]), sum);
      sum += v[i];
    end
  endtask

  task automatic run_b_prefix(input int v [NB]);
    int sum, lat;
    sum = 0;
    for (int i = 0; i < int'(NB); i++) dinb[i] = DB'(v[i]);
    sb = 1'b1; sadb = 1'b0;
    @(posedge clk); #1 sb = 1'b0;
    lat = 1;
    while (!tvb && lat < 20) begin @(posedge clk); #1 lat++; end
    check("B total latency", lat, 4);
    for (int i = 0; i < int'(NB); i++) sum += v[i];
    check("B total", int'(totb), sum);
    while (!pvb && lat < 20) begin @(posedge clk); #1 lat++; end
    check("B prefix latency", lat, 8);
    sum = 0;
    for (int i = 0; i < int'(NB); i++) begin
      check($sformatf("B prefix[%0d]", i), int'(pfxb[i]), sum);
      sum += v[i];
    end
  endtask

  initial begin
    int va [NA];
    int vb [NB];
    int exp_sad [3];
    sa = 0; sada = 0; sb = 0; sadb = 0;
    foreach (dina[i]) dina[i] = '0;
    foreach (dinb[i]) dinb[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check("A ready", int'(ra), 1);

    va = '{3, 1, 2, 0, 4, 1, 1, 3};
    run_a_prefix(va);
    va = '{15, 15, 15, 15, 15, 15, 15, 15};
    run_a_prefix(va);
    for (int n = 0; n < 200; n++) begin
      foreach (va[i]) va[i] = $urandom_range(0, 15);
      run_a_prefix(va);
    end

    // SAD mode, three rows back to back; results arrive every 3 cycles
    for (int n = 0; n < 3; n++) begin
      exp_sad[n] = 0;
      for (int i = 0; i < 4; i++) begin
        int x, y;
        x = (n == 0) ? 15 : $urandom_range(0, 15);
        y = (n == 0) ? 0 : $urandom_range(0, 15);
        dina[2*i] = DA'(x);
        dina[2*i+1] = DA'(y);
        exp_sad[n] += (x > y) ? x - y : y - x;
      end
      check("A ready before SAD start", int'(ra), 1);
      sa = 1'b1; sada = 1'b1;
      @(posedge clk); #1 sa = 1'b0; sada = 1'b0;
      if (n > 0) begin
        // the previous row's result is presented in the cycle of this start
      end
      @(posedge clk); #1;
      check("A SAD total_valid early", int'(tva), 0);
      @(posedge clk); #1;
      check("A SAD total_valid", int'(tva), 1);
      check($sformatf("A SAD row %0d", n), int'(tota), exp_sad[n]);
    end
    @(posedge clk); #1;
    check("A no twig after SAD", int'(pva), 0);

    // random SAD rows
    for (int n = 0; n < 200; n++) begin
      int s;
      s = 0;
      for (int i = 0; i < 4; i++) begin
        int x, y;
        x = $urandom_range(0, 15);
        y = $urandom_range(0, 15);
        dina[2*i] = DA'(x);
        dina[2*i+1] = DA'(y);
        s += (x > y) ? x - y : y - x;
      end
      sa = 1'b1; sada = 1'b1;
      @(posedge clk); #1 sa = 1'b0;
      repeat (2) @(posedge clk);
      #1 check("A random SAD", int'(tota), s);
    end

    // instance B
    for (int n = 0; n < 100; n++) begin
      foreach (vb[i]) vb[i] = (n == 0) ? 255 : $urandom_range(0, 255);
      run_b_prefix(vb);
    end
    begin
      int s;
      s = 0;
      for (int i = 0; i < 8; i++) begin
        int x, y;
        x = $urandom_range(0, 255);
        y = $urandom_range(0, 255);
        dinb[2*i] = DB'(x);
        dinb[2*i+1] = DB'(y);
        s += (x > y) ? x - y : y - x;
      end
      sb = 1'b1; sadb = 1'b1;
      @(posedge clk); #1 sb = 1'b0;
      repeat (3) @(posedge clk);
      #1 check("B SAD", int'(totb), s);
      check("B SAD valid", int'(tvb), 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
