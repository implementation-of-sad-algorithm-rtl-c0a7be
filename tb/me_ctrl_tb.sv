// me_ctrl_tb: self-checking test of the full-search sequencer (BLK = 4,
// R = 2). A simple engine model in the testbench accepts a start when idle
// and reports a result after a random 3..5 cycles (ready again in the
// reporting cycle, as the folded tree does). The test checks that the
// sequencer issues exactly 25 x 4 rows in raster order with the right
// current-row and reference-window addresses, that the tags presented with
// each result belong to that row, that busy falls after the last result,
// and that a second search starts cleanly.
module me_ctrl_tb;

  localparam int unsigned BLK = 4, R = 2, CW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, eng_ready, eng_start, res_valid;
  logic [1:0] cur_row;
  logic [2:0] ref_row, ref_col;
  logic tfr, tlr, tfc, tlc;
  logic signed [CW-1:0] tdx, tdy;
  int checks = 0, failures = 0;

  me_ctrl #(.BLK(BLK), .R(R)) dut (
    .clk, .rst_n, .start, .busy, .cur_row, .ref_row, .ref_col,
    .eng_ready, .eng_start, .res_valid,
    .tag_first_row(tfr), .tag_last_row(tlr), .tag_first_cand(tfc), .tag_last_cand(tlc),
    .tag_dx(tdx), .tag_dy(tdy));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // engine model
  int eng_cnt;
  assign eng_ready = (eng_cnt == 0) || (eng_cnt == 1);
  assign res_valid = (eng_cnt == 1);
  always_ff @(posedge clk) begin
    if (!rst_n) eng_cnt <= 0;
    else if (eng_start) eng_cnt <= $urandom_range(3, 5);
    else if (eng_cnt > 0) eng_cnt <= eng_cnt - 1;
  end

  // expected issue order and result checking
  int issued, results;
  int exp_dx [$], exp_dy [$], exp_row [$];
  always @(posedge clk) begin
    if (rst_n && eng_start) begin
      int n, row, dxi, dyi;
      n = issued % 100;
      row = n % 4;
      dxi = (n / 4) % 5;
      dyi = n / 20;
      checks++;
      if (int'(cur_row) != row || int'(ref_row) != row + dyi || int'(ref_col) != dxi) begin
        failures++;
        $display("issue %0d: rows %0d/%0d col %0d, expected %0d/%0d %0d", n, cur_row, ref_row,
                 ref_col, row, row + dyi, dxi);
      end
      exp_row.push_back(row);
      exp_dx.push_back(dxi - 2);
      exp_dy.push_back(dyi - 2);
      issued++;
    end
    if (rst_n && res_valid) begin
      int row, x, y, n;
      n = results % 100;
      row = exp_row.pop_front();
      x = exp_dx.pop_front();
      y = exp_dy.pop_front();
      checks++;
      if (tfr !== (row == 0) || tlr !== (row == 3) || tfc !== (x == -2 && y == -2) ||
          tlc !== (n >= 96) || int'(tdx) != x || int'(tdy) != y) begin
        failures++;
        $display("result %0d: tags fr%b lr%b fc%b lc%b (%0d,%0d), expected row %0d (%0d,%0d)",
                 n, tfr, tlr, tfc, tlc, tdx, tdy, row, x, y);
      end
      results++;
    end
  end

  initial begin
    start = 1'b0;
    issued = 0;
    results = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 2; s++) begin
      int cyc;
      start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      checks++;
      if (!busy) begin failures++; $display("busy not raised"); end
      cyc = 0;
      while (busy && cyc < 5000) begin @(posedge clk); #1 cyc++; end
      checks++;
      if (issued != 100 * (s + 1) || results != 100 * (s + 1)) begin
        failures++;
        $display("search %0d: issued %0d results %0d", s, issued, results);
      end
      repeat (3) @(posedge clk);
      checks++;
      if (issued != 100 * (s + 1)) begin failures++; $display("issue after search end"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
