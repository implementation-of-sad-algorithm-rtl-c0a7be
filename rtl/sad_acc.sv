// sad_acc: accumulator (ACC) that sums the partial SADs of one block.
//
// Each partial SAD (one block row, produced by the folded tree) arrives with
// in_valid. first marks the first row of a block and restarts the sum; last
// marks the final row, and in that cycle sad_valid is high and sad carries
// the complete block SAD (combinationally, including the arriving row). The
// running sum is registered. Accumulating partial SADs in ACC follows the
// SAD structure; the first/last framing is this design's choice.
module sad_acc #(
  parameter int unsigned IW   = 11,              // partial-SAD width
  parameter int unsigned ROWS = 4,               // partial SADs per block
  parameter int unsigned OW   = IW + $clog2(ROWS)  // block SAD width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          first,
  input  logic          last,
  input  logic [IW-1:0] din,
  output logic [OW-1:0] sad,
  output logic          sad_valid
);

  logic [OW-1:0] acc_q;

  assign sad       = (first ? '0 : acc_q) + OW'(din);
  assign sad_valid = in_valid && last;

  always_ff @(posedge clk) begin
    if (!rst_n)        acc_q <= '0;
    else if (in_valid) acc_q <= sad;
  end

endmodule
