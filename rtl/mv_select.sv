// mv_select: motion-vector decision by minimum SAD.
//
// Receives one block SAD per candidate displacement (in_valid, with the
// candidate's dx, dy). first marks the first candidate of a search and is
// always taken; afterwards a candidate replaces the best one only when its
// SAD is strictly smaller, so among equal SADs the earliest candidate wins.
// update is high in a cycle where the best candidate is replaced. When the
// candidate marked last has been compared, done pulses for one cycle and
// best_sad, mv_dx and mv_dy hold the result until the next search. Choosing
// the displacement with the smallest SAD is the usual block-matching rule;
// the tie rule is this design's choice.
module mv_select #(
  parameter int unsigned SW = 13,  // SAD width
  parameter int unsigned CW = 4    // signed displacement width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 first,
  input  logic                 last,
  input  logic [SW-1:0]        sad,
  input  logic signed [CW-1:0] dx,
  input  logic signed [CW-1:0] dy,
  output logic                 update,
  output logic [SW-1:0]        best_sad,
  output logic signed [CW-1:0] mv_dx,
  output logic signed [CW-1:0] mv_dy,
  output logic                 done
);

  assign update = in_valid && (first || sad < best_sad);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      best_sad <= '0;
      mv_dx    <= '0;
      mv_dy    <= '0;
      done     <= 1'b0;
    end else begin
      done <= in_valid && last;
      if (update) begin
        best_sad <= sad;
        mv_dx    <= dx;
        mv_dy    <= dy;
      end
    end
  end

endmodule
