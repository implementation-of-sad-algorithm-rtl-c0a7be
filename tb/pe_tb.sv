// pe_tb: self-checking test of one folded-tree processing element.
// Drives random instructions (trunk add, trunk absolute difference, twig,
// nop) with random operands and register-file addresses into a 3-entry PE,
// and compares out_l, out_r after every clock with a reference model kept in
// the testbench. Also replays the root PE of the 8-input example: trunk
// L=6, R=9 gives 15 and saves 6; twig with S=0 gives 0 and 6.
module pe_tb;
  import ft_pkg::*;

  localparam int unsigned W = 7;
  localparam int unsigned D = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  pe_instr_t instr;
  logic [W-1:0] a, b, out_l, out_r;
  int checks = 0, failures = 0;

  logic [W-1:0] m_lsave [D];
  logic [W-1:0] m_l, m_r;

  pe #(.W(W), .RF_DEPTH(D)) dut (.clk, .rst_n, .instr, .a, .b, .out_l, .out_r);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input pe_op_e op, input int unsigned addr, input logic [W-1:0] av, bv);
    instr.op   = op;
    instr.addr = RF_AW'(addr);
    a = av;
    b = bv;
    @(posedge clk);
    // reference model
    unique case (op)
      OP_ADD:     begin m_lsave[addr] = av; m_l = av + bv; end
      OP_ABSDIFF: begin m_lsave[addr] = av; m_l = (av > bv) ? av - bv : bv - av; end
      OP_TWIG:    begin m_r = av + m_lsave[addr]; m_l = av; end
      default: ;
    endcase
    #1;
    checks++;
    if (out_l !== m_l || out_r !== m_r) begin
      failures++;
      $display("mismatch op=%s addr=%0d a=%0d b=%0d: out_l=%0d/%0d out_r=%0d/%0d",
               op.name(), addr, av, bv, out_l, m_l, out_r, m_r);
    end
  endtask

  initial begin
    instr = '{op: OP_NOP, addr: '0};
    a = '0;
    b = '0;
    for (int i = 0; i < D; i++) m_lsave[i] = '0;
    m_l = '0;
    m_r = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // root PE of the 8-input example
    step(OP_ADD, 2, 7'd6, 7'd9);
    checks++;
    if (out_l != 7'd15) begin failures++; $display("root trunk sum %0d, expected 15", out_l); end
    step(OP_TWIG, 2, 7'd0, 7'd0);
    checks++;
    if (out_l != 7'd0 || out_r != 7'd6) begin
      failures++; $display("root twig %0d/%0d, expected 0/6", out_l, out_r);
    end
    step(OP_ABSDIFF, 0, 7'd3, 7'd10);
    checks++;
    if (out_l != 7'd7) begin failures++; $display("absdiff %0d, expected 7", out_l); end
    // random instruction stream
    for (int i = 0; i < 3000; i++) begin
      pe_op_e op;
      op = pe_op_e'($urandom_range(0, 3));
      step(op, $urandom_range(0, D - 1), W'($urandom), W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
