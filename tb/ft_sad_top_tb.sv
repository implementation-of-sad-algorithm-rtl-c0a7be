// ft_sad_top_tb: end-to-end test of the design at its default parameters.
//
// Prefix unit: the worked example 3 1 2 0 4 1 1 3 (total 15, exclusive
// prefixes 0 3 4 6 6 10 11 12), all-maximum inputs (total 120) and random
// vectors, partly started back to back; each total is checked 3 cycles and
// each prefix set 6 cycles after its start.
//
// Motion estimator: loads a 4 x 4 current block and an 8 x 8 reference
// window through the write ports and runs full searches over dx, dy in
// -2..2. Searches: an exact copy of a random window position, a noisy copy,
// a flat picture (all candidates tie, the first must win), a maximum-
// contrast picture (largest SAD 4080) and random pictures. Each result is
// compared with a full search computed here, and the search time is checked
// against 25 candidates x 4 rows x 3 cycles + 2.
//
// Mechanisms counted, each of which must occur: trunk phases, twig phases,
// back-to-back prefix starts, absolute-difference (SAD) tree rows, block
// accumulations, best-vector replacements and SAD ties.
module ft_sad_top_tb;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic       pfx_start, pfx_ready, pfx_total_valid, pfx_out_valid;
  logic [3:0] pfx_din [8];
  logic [6:0] pfx_total;
  logic [6:0] pfx_out [8];
  logic       cur_we, ref_we, me_start, me_busy, me_done;
  logic [1:0] cur_wr_row, cur_wr_col;
  logic [2:0] ref_wr_row, ref_wr_col;
  logic [7:0] cur_wr_data, ref_wr_data;
  logic [12:0] min_sad;
  logic signed [3:0] mv_dx, mv_dy;

  ft_sad_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_trunk = 0, n_twig = 0, n_b2b = 0, n_sad_rows = 0, n_blocks = 0, n_updates = 0, n_ties = 0;
  always @(posedge clk) if (rst_n) begin
    if (pfx_total_valid) n_trunk++;
    if (pfx_out_valid) n_twig++;
    if (pfx_out_valid && pfx_start) n_b2b++;
    if (dut.u_sad_tree.total_valid) n_sad_rows++;
    if (dut.u_acc.sad_valid) n_blocks++;
    if (dut.u_mv.update && !dut.u_mv.first) n_updates++;
    if (dut.u_acc.sad_valid && !dut.u_mv.first && dut.u_acc.sad == dut.u_mv.best_sad) n_ties++;
  end

  task automatic check(input string what, input int got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t: %s = %0d, expected %0d", $time, what, got, exp);
    end
  endtask

  // ---------------- prefix unit ----------------
  int pq [$];  // expected inputs of operations in flight, 8 per operation

  task automatic pfx_launch(input int v [8]);
    for (int i = 0; i < 8; i++) begin
      pfx_din[i] = 4'(v[i]);
      pq.push_back(v[i]);
    end
    check("prefix ready at start", int'(pfx_ready), 1);
    pfx_start = 1'b1;
    @(posedge clk); #1 pfx_start = 1'b0;
  endtask

  // checks the oldest operation in flight, whose start was one edge ago
  task automatic pfx_finish(input bit launch_next, input int nv [8]);
    int v [8];
    int sum;
    for (int i = 0; i < 8; i++) v[i] = pq.pop_front();
    repeat (2) @(posedge clk);
    #1 check("total_valid after 3 cycles", int'(pfx_total_valid), 1);
    sum = 0;
    foreach (v[i]) sum += v[i];
    check("prefix total", int'(pfx_total), sum);
    repeat (3) @(posedge clk);
    #1 check("prefix_valid after 6 cycles", int'(pfx_out_valid), 1);
    sum = 0;
    for (int i = 0; i < 8; i++) begin
      check($sformatf("prefix[%0d]", i), int'(pfx_out[i]), sum);
      sum += v[i];
    end
    if (launch_next) pfx_launch(nv);
  endtask

  // ---------------- motion estimator ----------------
  int cur_m [4][4];
  int ref_m [8][8];

  task automatic load_pictures();
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        cur_we = 1'b1; cur_wr_row = 2'(r); cur_wr_col = 2'(c); cur_wr_data = 8'(cur_m[r][c]);
        @(posedge clk); #1;
      end
    cur_we = 1'b0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        ref_we = 1'b1; ref_wr_row = 3'(r); ref_wr_col = 3'(c); ref_wr_data = 8'(ref_m[r][c]);
        @(posedge clk); #1;
      end
    ref_we = 1'b0;
  endtask

  task automatic search(input string name);
    int best, bx, by, cyc;
    best = -1; bx = 0; by = 0;
    for (int dy = -2; dy <= 2; dy++)
      for (int dx = -2; dx <= 2; dx++) begin
        int s;
        s = 0;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            int d;
            d = cur_m[r][c] - ref_m[r + dy + 2][c + dx + 2];
            s += (d < 0) ? -d : d;
          end
        if (best < 0 || s < best) begin best = s; bx = dx; by = dy; end
      end
    load_pictures();
    me_start = 1'b1;
    @(posedge clk); #1 me_start = 1'b0;
    cyc = 1;
    while (!me_done && cyc < 2000) begin @(posedge clk); #1 cyc++; end
    check({name, ": search cycles"}, cyc, 25 * 4 * 3 + 2);
    check({name, ": min_sad"}, int'(min_sad), best);
    check({name, ": mv_dx"}, int'(mv_dx), bx);
    check({name, ": mv_dy"}, int'(mv_dy), by);
    @(posedge clk); #1;
    check({name, ": busy cleared"}, int'(me_busy), 0);
    $display("%s: min SAD %0d at (%0d,%0d)", name, min_sad, mv_dx, mv_dy);
  endtask

  task automatic random_ref();
    foreach (ref_m[r, c]) ref_m[r][c] = $urandom_range(0, 255);
  endtask

  initial begin
    int v [8];
    int nv [8];
    pfx_start = 0; cur_we = 0; ref_we = 0; me_start = 0;
    cur_wr_row = '0; cur_wr_col = '0; cur_wr_data = '0;
    ref_wr_row = '0; ref_wr_col = '0; ref_wr_data = '0;
    foreach (pfx_din[i]) pfx_din[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // prefix unit
    v = '{3, 1, 2, 0, 4, 1, 1, 3};
    pfx_launch(v);
    pfx_finish(0, v);
    v = '{15, 15, 15, 15, 15, 15, 15, 15};
    pfx_launch(v);
    foreach (nv[i]) nv[i] = $urandom_range(0, 15);
    pfx_finish(1, nv);  // next one starts back to back
    for (int n = 0; n < 30; n++) begin
      foreach (nv[i]) nv[i] = $urandom_range(0, 15);
      pfx_finish(n < 29, nv);
    end

    // motion estimator
    random_ref();
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) cur_m[r][c] = ref_m[r + 3][c + 1];   // displacement (-1, +1)
    search("exact copy");
    check("exact copy: SAD 0", int'(min_sad), 0);
    check("exact copy: dx", int'(mv_dx), -1);
    check("exact copy: dy", int'(mv_dy), 1);

    random_ref();
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        int p;
        p = ref_m[r + 4][c + 2] + $urandom_range(0, 6) - 3;   // displacement (0, +2)
        cur_m[r][c] = (p < 0) ? 0 : (p > 255) ? 255 : p;
      end
    search("noisy copy");

    foreach (ref_m[r, c]) ref_m[r][c] = 77;
    foreach (cur_m[r, c]) cur_m[r][c] = 77;
    search("flat picture");
    check("flat picture: first candidate wins dx", int'(mv_dx), -2);
    check("flat picture: first candidate wins dy", int'(mv_dy), -2);

    foreach (ref_m[r, c]) ref_m[r][c] = 0;
    foreach (cur_m[r, c]) cur_m[r][c] = 255;
    search("maximum contrast");
    check("maximum contrast: SAD", int'(min_sad), 4080);

    for (int n = 0; n < 3; n++) begin
      random_ref();
      foreach (cur_m[r, c]) cur_m[r][c] = $urandom_range(0, 255);
      search($sformatf("random picture %0d", n));
    end

    $display("mechanisms: trunk %0d twig %0d back-to-back %0d sad-rows %0d blocks %0d updates %0d ties %0d",
             n_trunk, n_twig, n_b2b, n_sad_rows, n_blocks, n_updates, n_ties);
    check("trunk phases seen", int'(n_trunk > 0), 1);
    check("twig phases seen", int'(n_twig > 0), 1);
    check("back-to-back prefix starts seen", int'(n_b2b > 0), 1);
    check("SAD tree rows", n_sad_rows, 7 * 100);
    check("blocks accumulated", n_blocks, 7 * 25);
    check("best-vector replacements seen", int'(n_updates > 0), 1);
    check("SAD ties seen", int'(n_ties > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
