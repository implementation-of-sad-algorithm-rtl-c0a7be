// ft_ctrl_tb: self-checking test of the folded-tree sequencer with 4 PEs.
// For a prefix operation it checks, cycle by cycle, the level schedule
// (trunk levels 0,1,2 then twig levels 2,1,0), the opcode and register-file
// address issued to each PE (PE1..PE4 active at level 0, PE3..PE4 at level 1,
// PE4 alone at level 2), the ready signal, and that total_valid and
// prefix_valid rise exactly 3 and 6 cycles after the start. For a SAD
// operation it checks OP_ABSDIFF at level 0, no twig phase, and
// back-to-back starts.
module ft_ctrl_tb;
  import ft_pkg::*;

  localparam int unsigned NPE = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, sad_mode, ready, total_valid, prefix_valid;
  ft_phase_e phase;
  logic [RF_AW-1:0] lvl;
  pe_instr_t instr [NPE];
  int checks = 0, failures = 0;

  ft_ctrl #(.NPE(NPE)) dut (.clk, .rst_n, .start, .sad_mode, .ready, .phase, .lvl,
                            .instr, .total_valid, .prefix_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_level(input ft_phase_e ph, input int l, input bit sad);
    checks++;
    if (phase !== ph || int'(lvl) != l) begin
      failures++;
      $display("%0t: phase %s lvl %0d, expected %s %0d", $time, phase.name(), lvl, ph.name(), l);
    end
    for (int j = 0; j < int'(NPE); j++) begin
      pe_op_e e;
      bit act;
      act = (l == 0) || (l == 1 && j >= 2) || (l == 2 && j == 3);
      if (!act) e = OP_NOP;
      else if (ph == PH_TWIG) e = OP_TWIG;
      else if (sad && l == 0) e = OP_ABSDIFF;
      else e = OP_ADD;
      checks++;
      if (instr[j].op !== e || (act && int'(instr[j].addr) != l)) begin
        failures++;
        $display("%0t: PE%0d op %s addr %0d, expected %s %0d", $time, j + 1,
                 instr[j].op.name(), instr[j].addr, e.name(), l);
      end
    end
  endtask

  task automatic expect_flags(input bit tv, pv, rdy);
    checks++;
    if (total_valid !== tv || prefix_valid !== pv || ready !== rdy) begin
      failures++;
      $display("%0t: total_valid %b prefix_valid %b ready %b, expected %b %b %b",
               $time, total_valid, prefix_valid, ready, tv, pv, rdy);
    end
  endtask

  initial begin
    start = 1'b0;
    sad_mode = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    expect_flags(0, 0, 1);
    checks++;
    if (phase != PH_IDLE) begin failures++; $display("not idle after reset"); end
    // prefix operation
    start = 1'b1;
    #1 expect_level(PH_TRUNK, 0, 0);
    @(posedge clk); #1 start = 1'b0;
    expect_flags(0, 0, 0); expect_level(PH_TRUNK, 1, 0);
    @(posedge clk); #1 expect_flags(0, 0, 0); expect_level(PH_TRUNK, 2, 0);
    @(posedge clk); #1 expect_flags(1, 0, 0); expect_level(PH_TWIG, 2, 0);
    @(posedge clk); #1 expect_flags(0, 0, 0); expect_level(PH_TWIG, 1, 0);
    @(posedge clk); #1 expect_flags(0, 0, 0); expect_level(PH_TWIG, 0, 0);
    @(posedge clk); #1 expect_flags(0, 1, 1);
    checks++;
    if (phase != PH_IDLE) begin failures++; $display("not idle after twig"); end
    // two SAD operations back to back
    for (int n = 0; n < 2; n++) begin
      start = 1'b1;
      sad_mode = 1'b1;
      #1 expect_level(PH_TRUNK, 0, 1);
      @(posedge clk); #1 start = 1'b0; sad_mode = 1'b0;
      expect_flags(0, 0, 0); expect_level(PH_TRUNK, 1, 1);
      @(posedge clk); #1 expect_flags(0, 0, 0); expect_level(PH_TRUNK, 2, 1);
      @(posedge clk); #1 expect_flags(1, 0, 1);
    end
    @(posedge clk); #1 expect_flags(0, 0, 1);
    checks++;
    if (phase != PH_IDLE) begin failures++; $display("not idle after SAD"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
