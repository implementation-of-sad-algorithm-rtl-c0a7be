// mv_select_tb: self-checking test of the minimum-SAD vector selector.
// Runs searches of 25 candidates (dx, dy in -2..2) with random SADs drawn
// from a small range so that ties occur, and compares best_sad, mv_dx and
// mv_dy after done with a minimum (earliest on ties) computed here. Checks
// that done pulses exactly once per search and counts the ties seen.
module mv_select_tb;

  localparam int unsigned SW = 13, CW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, first, last, update, done;
  logic [SW-1:0] sad, best_sad;
  logic signed [CW-1:0] dx, dy, mv_dx, mv_dy;
  int checks = 0, failures = 0, ties = 0;

  mv_select #(.SW(SW), .CW(CW)) dut (.clk, .rst_n, .in_valid, .first, .last, .sad, .dx, .dy,
                                     .update, .best_sad, .mv_dx, .mv_dy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; first = 0; last = 0; sad = '0; dx = '0; dy = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 200; s++) begin
      int best, bx, by, n;
      best = -1; bx = 0; by = 0; n = 0;
      for (int y = -2; y <= 2; y++)
        for (int x = -2; x <= 2; x++) begin
          int v;
          v = (s % 2 == 0) ? $urandom_range(0, 8191) : $urandom_range(100, 110);
          if (best >= 0 && v == best) ties++;
          if (best < 0 || v < best) begin best = v; bx = x; by = y; end
          in_valid = 1;
          first = (n == 0);
          last = (n == 24);
          sad = SW'(v);
          dx = CW'(x);
          dy = CW'(y);
          @(posedge clk); #1;
          checks++;
          if (done !== last) begin failures++; $display("done %b at candidate %0d", done, n); end
          in_valid = 0;
          n++;
          if ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
        end
      checks++;
      if (int'(best_sad) != best || int'(mv_dx) != bx || int'(mv_dy) != by) begin
        failures++;
        $display("search %0d: %0d (%0d,%0d), expected %0d (%0d,%0d)", s, best_sad, mv_dx, mv_dy,
                 best, bx, by);
      end
    end
    checks++;
    if (ties == 0) begin failures++; $display("no tie was exercised"); end
    $display("ties exercised: %0d", ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
