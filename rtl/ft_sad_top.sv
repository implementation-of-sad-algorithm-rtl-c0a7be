// ft_sad_top: folded-tree processors for on-node data aggregation and for
// SAD block-matching motion estimation.
//
// Two independent units stand side by side:
//
//  * Prefix unit: a 4-PE folded tree over PFX_N = 8 inputs of PFX_DW = 4
//    bits. pfx_start launches one operation; pfx_total (7 bits) is the sum of
//    the eight inputs, valid with pfx_total_valid 3 cycles later, and
//    pfx_out[i] is the exclusive prefix sum of inputs 0..i-1, valid with
//    pfx_out_valid 6 cycles after the start.
//
//  * Motion estimator: a BLK x BLK (4 x 4) current block and a
//    (BLK+2*SEARCH_R)-square reference window are loaded through their write
//    ports; me_start then runs a full search over displacements dx, dy in
//    [-SEARCH_R, SEARCH_R]. Each block row is one partial SAD, computed by a
//    second 4-PE folded tree whose leaf PEs take |X - Y| of pixel pairs; ACC
//    sums the four partial SADs of a candidate and the selector keeps the
//    smallest. me_done pulses when min_sad, mv_dx and mv_dy are final.
//    With the defaults a search of 25 candidates takes 25 * 4 * 3 = 300
//    tree cycles plus a few cycles of start and drain.
//
// The folded tree, its PE program and the SAD-on-folded-tree mapping follow
// the architecture; pixel width, block size, search range, memory
// organisation and the handshakes are this design's choices.
module ft_sad_top #(
  parameter int unsigned PFX_N    = 8,  // prefix unit inputs
  parameter int unsigned PFX_DW   = 4,  // prefix unit input width
  parameter int unsigned BLK      = 4,  // SAD block size
  parameter int unsigned PIX_W    = 8,  // pixel width
  parameter int unsigned SEARCH_R = 2,  // search range
  localparam int unsigned PFX_OW  = PFX_DW + $clog2(PFX_N),
  localparam int unsigned WIN     = BLK + 2 * SEARCH_R,
  localparam int unsigned BA      = (BLK > 1) ? $clog2(BLK) : 1,
  localparam int unsigned WA      = $clog2(WIN),
  localparam int unsigned ROW_W   = PIX_W + $clog2(2 * BLK),
  localparam int unsigned SAD_W   = ROW_W + $clog2(BLK),
  localparam int unsigned CW      = $clog2(2 * SEARCH_R + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // prefix unit
  input  logic                 pfx_start,
  output logic                 pfx_ready,
  input  logic [PFX_DW-1:0]    pfx_din [PFX_N],
  output logic [PFX_OW-1:0]    pfx_total,
  output logic                 pfx_total_valid,
  output logic [PFX_OW-1:0]    pfx_out [PFX_N],
  output logic                 pfx_out_valid,
  // current block memory write port
  input  logic                 cur_we,
  input  logic [BA-1:0]        cur_wr_row,
  input  logic [BA-1:0]        cur_wr_col,
  input  logic [PIX_W-1:0]     cur_wr_data,
  // reference window memory write port
  input  logic                 ref_we,
  input  logic [WA-1:0]        ref_wr_row,
  input  logic [WA-1:0]        ref_wr_col,
  input  logic [PIX_W-1:0]     ref_wr_data,
  // motion search
  input  logic                 me_start,
  output logic                 me_busy,
  output logic                 me_done,
  output logic [SAD_W-1:0]     min_sad,
  output logic signed [CW-1:0] mv_dx,
  output logic signed [CW-1:0] mv_dy
);

  // ---------------- prefix unit ----------------
  folded_tree #(.N(PFX_N), .DW(PFX_DW)) u_pfx_tree (
    .clk, .rst_n,
    .start        (pfx_start),
    .sad_mode     (1'b0),
    .din          (pfx_din),
    .ready        (pfx_ready),
    .total        (pfx_total),
    .total_valid  (pfx_total_valid),
    .prefix       (pfx_out),
    .prefix_valid (pfx_out_valid)
  );

  // ---------------- motion estimator ----------------
  logic [BA-1:0]        cur_rd_row;
  logic [WA-1:0]        ref_rd_row, ref_rd_col;
  logic [PIX_W-1:0]     cur_pix [BLK];
  logic [PIX_W-1:0]     ref_pix [BLK];
  logic [PIX_W-1:0]     pairs   [2*BLK];
  logic                 eng_ready, eng_start, row_valid;
  logic [ROW_W-1:0]     row_sad;
  logic [ROW_W-1:0]     unused_prefix [2*BLK];
  logic                 unused_prefix_valid;
  logic                 t_first_row, t_last_row, t_first_cand, t_last_cand;
  logic signed [CW-1:0] t_dx, t_dy;
  logic [SAD_W-1:0]     blk_sad;
  logic                 blk_valid;

  pixel_mem #(.ROWS(BLK), .COLS(BLK), .RD_W(BLK), .PW(PIX_W)) u_cur_mem (
    .clk,
    .we      (cur_we),
    .wr_row  (cur_wr_row),
    .wr_col  (cur_wr_col),
    .wr_data (cur_wr_data),
    .rd_row  (cur_rd_row),
    .rd_col  ('0),
    .rd_data (cur_pix)
  );

  pixel_mem #(.ROWS(WIN), .COLS(WIN), .RD_W(BLK), .PW(PIX_W)) u_ref_mem (
    .clk,
    .we      (ref_we),
    .wr_row  (ref_wr_row),
    .wr_col  (ref_wr_col),
    .wr_data (ref_wr_data),
    .rd_row  (ref_rd_row),
    .rd_col  (ref_rd_col),
    .rd_data (ref_pix)
  );

  me_ctrl #(.BLK(BLK), .R(SEARCH_R)) u_me_ctrl (
    .clk, .rst_n,
    .start          (me_start),
    .busy           (me_busy),
    .cur_row        (cur_rd_row),
    .ref_row        (ref_rd_row),
    .ref_col        (ref_rd_col),
    .eng_ready      (eng_ready),
    .eng_start      (eng_start),
    .res_valid      (row_valid),
    .tag_first_row  (t_first_row),
    .tag_last_row   (t_last_row),
    .tag_first_cand (t_first_cand),
    .tag_last_cand  (t_last_cand),
    .tag_dx         (t_dx),
    .tag_dy         (t_dy)
  );

  // Leaf pair i of the SAD tree is (X0i, Y0i): current pixel left, reference right.
  always_comb
    for (int unsigned i = 0; i < BLK; i++) begin
      pairs[2*i]   = cur_pix[i];
      pairs[2*i+1] = ref_pix[i];
    end

  folded_tree #(.N(2 * BLK), .DW(PIX_W)) u_sad_tree (
    .clk, .rst_n,
    .start        (eng_start),
    .sad_mode     (1'b1),
    .din          (pairs),
    .ready        (eng_ready),
    .total        (row_sad),
    .total_valid  (row_valid),
    .prefix       (unused_prefix),
    .prefix_valid (unused_prefix_valid)
  );

  sad_acc #(.IW(ROW_W), .ROWS(BLK)) u_acc (
    .clk, .rst_n,
    .in_valid  (row_valid),
    .first     (t_first_row),
    .last      (t_last_row),
    .din       (row_sad),
    .sad       (blk_sad),
    .sad_valid (blk_valid)
  );

  mv_select #(.SW(SAD_W), .CW(CW)) u_mv (
    .clk, .rst_n,
    .in_valid (blk_valid),
    .first    (t_first_cand),
    .last     (t_last_cand),
    .sad      (blk_sad),
    .dx       (t_dx),
    .dy       (t_dy),
    .update   (),
    .best_sad (min_sad),
    .mv_dx    (mv_dx),
    .mv_dy    (mv_dy),
    .done     (me_done)
  );

endmodule
