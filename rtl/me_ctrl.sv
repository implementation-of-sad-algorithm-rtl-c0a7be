// me_ctrl: full-search sequencer of the SAD motion estimator.
//
// A search compares the BLK x BLK current block with every candidate block
// of the reference window displaced by dx, dy in [-R, R] (raster order: dy
// outer, dx inner). For each candidate and each block row it reads one row of
// the current block and the matching row segment of the reference window and
// starts the folded tree in SAD mode, whenever the tree is ready. A folded
// tree takes LEVELS cycles per row, so a search takes about
// (2R+1)^2 * BLK * LEVELS cycles. The tags of the row in flight (first/last
// row of the block, first/last candidate, dx, dy) are held until the tree
// reports its result (res_valid) and are then presented to the accumulator
// and the vector selector. That pixels are read from memory for the SAD tree
// is given; the full-search order, the window size and the tagging are this
// design's choices.
//
// Reference window coordinates: candidate (dx, dy), row r reads window row
// r + dy + R, columns dx + R .. dx + R + BLK - 1.
module me_ctrl #(
  parameter int unsigned BLK = 4,                       // block size (pixels per row, rows)
  parameter int unsigned R   = 2,                       // search range
  localparam int unsigned WIN = BLK + 2 * R,            // window size
  localparam int unsigned BA  = (BLK > 1) ? $clog2(BLK) : 1,
  localparam int unsigned WA  = $clog2(WIN),
  localparam int unsigned CW  = $clog2(2 * R + 1) + 1   // signed displacement width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,       // begin a search
  output logic                 busy,
  // pixel memory read addresses
  output logic [BA-1:0]        cur_row,
  output logic [WA-1:0]        ref_row,
  output logic [WA-1:0]        ref_col,
  // folded tree handshake
  input  logic                 eng_ready,
  output logic                 eng_start,
  input  logic                 res_valid,   // tree reports the row SAD
  // tags of the row whose result is reported
  output logic                 tag_first_row,
  output logic                 tag_last_row,
  output logic                 tag_first_cand,
  output logic                 tag_last_cand,
  output logic signed [CW-1:0] tag_dx,
  output logic signed [CW-1:0] tag_dy
);

  localparam int unsigned NC = 2 * R + 1;
  localparam int unsigned CI = $clog2(NC);

  logic          run_q, issuing_q;
  logic [CI-1:0] dxi_q, dyi_q;
  logic [BA-1:0] row_q;
  logic          last_issue;

  // in-flight tags
  logic          f_first_row, f_last_row, f_first_cand, f_last_cand;
  logic [CI-1:0] f_dxi, f_dyi;

  assign busy       = run_q;
  assign eng_start  = issuing_q && eng_ready;
  assign last_issue = (int'(dyi_q) == NC - 1) && (int'(dxi_q) == NC - 1) &&
                      (int'(row_q) == BLK - 1);

  assign cur_row = row_q;
  assign ref_row = WA'(int'(row_q) + int'(dyi_q));
  assign ref_col = WA'(dxi_q);

  assign tag_first_row  = f_first_row;
  assign tag_last_row   = f_last_row;
  assign tag_first_cand = f_first_cand;
  assign tag_last_cand  = f_last_cand;
  assign tag_dx         = CW'(signed'(int'(f_dxi) - int'(R)));
  assign tag_dy         = CW'(signed'(int'(f_dyi) - int'(R)));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q        <= 1'b0;
      issuing_q    <= 1'b0;
      dxi_q        <= '0;
      dyi_q        <= '0;
      row_q        <= '0;
      f_first_row  <= 1'b0;
      f_last_row   <= 1'b0;
      f_first_cand <= 1'b0;
      f_last_cand  <= 1'b0;
      f_dxi        <= '0;
      f_dyi        <= '0;
    end else begin
      if (!run_q && start) begin
        run_q     <= 1'b1;
        issuing_q <= 1'b1;
        dxi_q     <= '0;
        dyi_q     <= '0;
        row_q     <= '0;
      end
      if (eng_start) begin
        f_first_row  <= (row_q == '0);
        f_last_row   <= (int'(row_q) == BLK - 1);
        f_first_cand <= (dxi_q == '0) && (dyi_q == '0);
        f_last_cand  <= (int'(dyi_q) == NC - 1) && (int'(dxi_q) == NC - 1);
        f_dxi        <= dxi_q;
        f_dyi        <= dyi_q;
        if (last_issue) begin
          issuing_q <= 1'b0;
        end else if (int'(row_q) < BLK - 1) begin
          row_q <= row_q + 1'b1;
        end else begin
          row_q <= '0;
          if (int'(dxi_q) < NC - 1) begin
            dxi_q <= dxi_q + 1'b1;
          end else begin
            dxi_q <= '0;
            dyi_q <= dyi_q + 1'b1;
          end
        end
      end
      if (res_valid && f_last_cand && f_last_row)
        run_q <= 1'b0;
    end
  end

endmodule
