// pe: one processing element of the folded tree.
//
// Each PE executes one instruction per cycle, supplied by the tree sequencer:
//   OP_ADD     (trunk)  saves the left operand L in Lsave[addr] and registers
//                       L + R on out_l, the value passed towards the root.
//   OP_ABSDIFF (trunk)  as OP_ADD but registers |L - R|; used at the leaf level
//                       when the tree computes a sum of absolute differences.
//   OP_TWIG    (twig)   the incoming value S arrives on a; registers S on
//                       out_l (passed to the left child) and S + Lsave[addr]
//                       on out_r (passed to the right child).
//   OP_NOP              holds everything.
// Saving L and passing L+R in the trunk phase, and passing S left and
// S+Lsave right in the twig phase, is Blelloch's scheme as the folded tree
// uses it. The register file has RF_DEPTH entries, one per tree level the PE
// serves (1, 1, 2 and 3 for the four PEs of an 8-input tree). Operands are
// zero-extended to W bits by the caller; sums wrap at W bits, so W must hold
// the largest total. Results appear one clock after the instruction; the
// register file and outputs are cleared by the synchronous active-low reset.
module pe
  import ft_pkg::*;
#(
  parameter int unsigned W        = 7,  // datapath width (7-bit output of 8 x 4-bit sum)
  parameter int unsigned RF_DEPTH = 3   // Lsave entries (3 for the root PE)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pe_instr_t        instr,
  input  logic [W-1:0]     a,      // L in trunk, S in twig
  input  logic [W-1:0]     b,      // R in trunk, unused in twig
  output logic [W-1:0]     out_l,  // L+R / |L-R| in trunk, S in twig
  output logic [W-1:0]     out_r   // S+Lsave in twig
);

  localparam int unsigned AW = (RF_DEPTH > 1) ? $clog2(RF_DEPTH) : 1;

  logic [W-1:0]  lsave [RF_DEPTH];
  logic [AW-1:0] idx;
  logic [W-1:0]  lsave_rd;

  assign idx      = AW'(instr.addr);
  assign lsave_rd = lsave[idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_l <= '0;
      out_r <= '0;
      for (int i = 0; i < int'(RF_DEPTH); i++) lsave[i] <= '0;
    end else begin
      unique case (instr.op)
        OP_ADD: begin
          lsave[idx] <= a;
          out_l      <= a + b;
        end
        OP_ABSDIFF: begin
          lsave[idx] <= a;
          out_l      <= (a >= b) ? a - b : b - a;
        end
        OP_TWIG: begin
          out_l <= a;
          out_r <= a + lsave_rd;
        end
        default: ;
      endcase
    end
  end

  // The sequencer never addresses an Lsave entry beyond this PE's depth.
  always_ff @(posedge clk)
    if (rst_n && instr.op != OP_NOP)
      a_addr_in_range : assert (int'(instr.addr) < int'(RF_DEPTH))
        else $error("pe: Lsave address %0d out of range", instr.addr);

endmodule
