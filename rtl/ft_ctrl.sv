// ft_ctrl: sequencer that runs the PE program of a folded tree.
//
// One operation walks the tree levels: the trunk phase from the leaf level
// (0) up to the root level (LEVELS-1), then, unless sad_mode is set, the twig
// phase from the root level back down to level 0. Each cycle executes one
// level: the PEs serving that level (the last NPE >> lvl of them) receive an
// instruction whose register-file address is the level number, all other PEs
// receive OP_NOP. The trunk instructions are identical apart from that
// address, as in the folded-tree program; at level 0 in sad_mode the leaves
// take absolute differences instead of sums, so the same program computes a
// row SAD. Having sad_mode skip the twig phase is this design's choice: a SAD
// needs only the reduction.
//
// Timing: start is accepted when ready is high, and the first level executes
// in that same cycle (inputs are sampled at that clock edge). total_valid
// rises LEVELS cycles after start, for one cycle, while the root PE holds the
// reduction. In prefix mode the twig phase follows at once and prefix_valid
// rises 2*LEVELS cycles after start, for one cycle. ready is high again in
// the cycle total_valid (sad_mode) or prefix_valid (prefix mode) is high, so
// operations can follow back to back. phase/lvl give the level executing in
// the current cycle, for the datapath's operand routing.
module ft_ctrl
  import ft_pkg::*;
#(
  parameter int unsigned NPE = 4  // processing elements (8 leaves)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      sad_mode,
  output logic                      ready,
  output ft_phase_e                 phase,
  output logic [RF_AW-1:0]          lvl,
  output pe_instr_t                 instr [NPE],
  output logic                      total_valid,
  output logic                      prefix_valid
);

  localparam int unsigned LEVELS = $clog2(2 * NPE);

  ft_phase_e        phase_q;
  logic [RF_AW-1:0] lvl_q;
  logic             sad_q;
  logic             sad_cur;

  assign ready = (phase_q == PH_IDLE);

  // Level executing in this cycle.
  always_comb begin
    if (phase_q == PH_IDLE && start) begin
      phase   = PH_TRUNK;
      lvl     = '0;
      sad_cur = sad_mode;
    end else begin
      phase   = phase_q;
      lvl     = lvl_q;
      sad_cur = sad_q;
    end
  end

  // PE program for this level.
  always_comb begin
    for (int unsigned j = 0; j < NPE; j++) begin
      instr[j].addr = lvl;
      instr[j].op   = OP_NOP;
      if (phase != PH_IDLE && pe_active(j, NPE, int'(lvl))) begin
        if (phase == PH_TWIG)
          instr[j].op = OP_TWIG;
        else if (lvl == '0 && sad_cur)
          instr[j].op = OP_ABSDIFF;
        else
          instr[j].op = OP_ADD;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q      <= PH_IDLE;
      lvl_q        <= '0;
      sad_q        <= 1'b0;
      total_valid  <= 1'b0;
      prefix_valid <= 1'b0;
    end else begin
      total_valid  <= (phase == PH_TRUNK) && (int'(lvl) == LEVELS - 1);
      prefix_valid <= (phase == PH_TWIG) && (lvl == '0);
      sad_q        <= sad_cur;
      unique case (phase)
        PH_TRUNK: begin
          if (int'(lvl) < LEVELS - 1) begin
            phase_q <= PH_TRUNK;
            lvl_q   <= lvl + 1'b1;
          end else if (sad_cur) begin
            phase_q <= PH_IDLE;
            lvl_q   <= '0;
          end else begin
            phase_q <= PH_TWIG;
            lvl_q   <= RF_AW'(LEVELS - 1);
          end
        end
        PH_TWIG: begin
          if (lvl != '0) begin
            phase_q <= PH_TWIG;
            lvl_q   <= lvl - 1'b1;
          end else begin
            phase_q <= PH_IDLE;
          end
        end
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

  // A start while busy would be lost.
  always_ff @(posedge clk)
    if (rst_n && start)
      a_start_when_ready : assert (ready)
        else $error("ft_ctrl: start while busy");

endmodule
