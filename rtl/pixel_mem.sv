// pixel_mem: two-dimensional pixel store with a row-segment read port.
//
// Holds a ROWS x COLS picture area (the current block or the reference
// search window of the motion estimator). Pixels are written one per clock
// (we, wr_row, wr_col, wr_data). The read port is combinational and returns
// RD_W horizontally adjacent pixels of row rd_row starting at column rd_col,
// which is the set of pixels one partial SAD consumes. The memory is a
// register array without reset; the content is only defined once written.
// That pixels are read from a memory is all the architecture prescribes;
// the organisation and ports are this design's choice.
module pixel_mem #(
  parameter int unsigned ROWS = 8,   // picture rows held
  parameter int unsigned COLS = 8,   // picture columns held
  parameter int unsigned RD_W = 4,   // pixels per read
  parameter int unsigned PW   = 8,   // pixel width
  localparam int unsigned RA  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CA  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [RA-1:0] wr_row,
  input  logic [CA-1:0] wr_col,
  input  logic [PW-1:0] wr_data,
  input  logic [RA-1:0] rd_row,
  input  logic [CA-1:0] rd_col,
  output logic [PW-1:0] rd_data [RD_W]
);

  logic [PW-1:0] mem [ROWS][COLS];

  always_ff @(posedge clk)
    if (we) mem[wr_row][wr_col] <= wr_data;

  always_comb
    for (int unsigned i = 0; i < RD_W; i++)
      rd_data[i] = mem[rd_row][(int'(rd_col) + i) % COLS];

  always_ff @(posedge clk) begin
    if (we)
      a_wr_in_range : assert (int'(wr_row) < ROWS && int'(wr_col) < COLS)
        else $error("pixel_mem: write outside the array");
  end

endmodule
