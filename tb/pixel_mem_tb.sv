// pixel_mem_tb: self-checking test of the pixel memory with an 8 x 8 array
// and 4-pixel row reads. Writes random pixels to every location, then reads
// every row segment that the motion search uses (columns 0..4) and compares
// each pixel with a copy kept in the testbench; finally overwrites random
// single pixels and reads them back.
module pixel_mem_tb;

  localparam int unsigned ROWS = 8, COLS = 8, RD_W = 4, PW = 8;

  logic clk = 1'b0;
  logic we;
  logic [2:0] wr_row, wr_col, rd_row, rd_col;
  logic [PW-1:0] wr_data;
  logic [PW-1:0] rd_data [RD_W];
  logic [PW-1:0] model [ROWS][COLS];
  int checks = 0, failures = 0;

  pixel_mem #(.ROWS(ROWS), .COLS(COLS), .RD_W(RD_W), .PW(PW)) dut (
    .clk, .we, .wr_row, .wr_col, .wr_data, .rd_row, .rd_col, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int r, c, v);
    we = 1'b1;
    wr_row = 3'(r);
    wr_col = 3'(c);
    wr_data = PW'(v);
    model[r][c] = PW'(v);
    @(posedge clk);
    #1 we = 1'b0;
  endtask

  task automatic check_read(input int r, c);
    rd_row = 3'(r);
    rd_col = 3'(c);
    #1;
    for (int i = 0; i < int'(RD_W); i++) begin
      checks++;
      if (rd_data[i] !== model[r][c+i]) begin
        failures++;
        $display("read (%0d,%0d)+%0d = %0d, expected %0d", r, c, i, rd_data[i], model[r][c+i]);
      end
    end
  endtask

  initial begin
    we = 1'b0;
    wr_row = '0; wr_col = '0; wr_data = '0; rd_row = '0; rd_col = '0;
    @(posedge clk); #1;
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++)
        write(r, c, $urandom_range(0, 255));
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c <= int'(COLS - RD_W); c++)
        check_read(r, c);
    for (int n = 0; n < 300; n++) begin
      int r, c;
      r = $urandom_range(0, ROWS - 1);
      c = $urandom_range(0, COLS - RD_W);
      write(r, c + $urandom_range(0, RD_W - 1), $urandom_range(0, 255));
      check_read(r, c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
