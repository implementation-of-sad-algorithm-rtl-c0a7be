// sad_acc_tb: self-checking test of the partial-SAD accumulator.
// Feeds blocks of 4 random partial SADs (with idle cycles between them at
// random), checks that sad_valid rises only with the last row and that sad
// then equals the sum of the block's four rows, independently summed here.
module sad_acc_tb;

  localparam int unsigned IW = 11, ROWS = 4, OW = 13;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, first, last;
  logic [IW-1:0] din;
  logic [OW-1:0] sad;
  logic sad_valid;
  int checks = 0, failures = 0;

  sad_acc #(.IW(IW), .ROWS(ROWS)) dut (.clk, .rst_n, .in_valid, .first, .last, .din, .sad, .sad_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; first = 0; last = 0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int blk = 0; blk < 500; blk++) begin
      int sum;
      sum = 0;
      for (int r = 0; r < int'(ROWS); r++) begin
        int v;
        while ($urandom_range(0, 3) == 0) begin
          in_valid = 0;
          din = IW'($urandom);
          @(posedge clk); #1;
        end
        v = (blk == 0) ? 1020 : $urandom_range(0, 1020);
        sum += v;
        in_valid = 1;
        first = (r == 0);
        last = (r == int'(ROWS) - 1);
        din = IW'(v);
        #1;
        checks++;
        if (sad_valid !== last) begin
          failures++;
          $display("block %0d row %0d: sad_valid %b", blk, r, sad_valid);
        end
        if (last) begin
          checks++;
          if (int'(sad) != sum) begin
            failures++;
            $display("block %0d: sad %0d, expected %0d", blk, sad, sum);
          end
        end
        @(posedge clk); #1;
        in_valid = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
