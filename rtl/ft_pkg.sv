// ft_pkg: types and helper functions shared by the folded-tree processor.
//
// A folded tree maps the nodes of a binary tree over N leaves onto N/2
// processing elements (PEs). At tree level l (0 = leaf level) the active PEs
// are the last N/2 >> l of them, so PE j is active at level l when
// j >= NPE - (NPE >> l). PE j therefore holds one saved left value (Lsave)
// per level it serves, and the register-file address used at level l is l.
// The PE instruction set (trunk add, trunk absolute difference, twig) and the
// per-level activation follow the folded-tree description; the encodings and
// the 4-bit address field are this design's choice.
package ft_pkg;

  // Width of the register-file address field in a PE instruction.
  localparam int unsigned RF_AW = 4;

  typedef enum logic [1:0] {
    OP_NOP     = 2'd0,  // PE idle, registers unchanged
    OP_ADD     = 2'd1,  // trunk: Lsave[addr] <= L, out_l <= L + R
    OP_ABSDIFF = 2'd2,  // trunk at SAD leaves: Lsave[addr] <= L, out_l <= |L - R|
    OP_TWIG    = 2'd3   // twig: out_l <= S, out_r <= S + Lsave[addr]
  } pe_op_e;

  typedef struct packed {
    pe_op_e           op;
    logic [RF_AW-1:0] addr;
  } pe_instr_t;

  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,
    PH_TRUNK = 2'd1,
    PH_TWIG  = 2'd2
  } ft_phase_e;

  // True when PE j (0-based) of an NPE-PE folded tree serves tree level lvl.
  function automatic bit pe_active(int unsigned j, int unsigned npe, int unsigned lvl);
    return j >= npe - (npe >> lvl);
  endfunction

  // Number of Lsave entries PE j needs: one per level it serves.
  function automatic int unsigned pe_rf_depth(int unsigned j, int unsigned npe);
    int unsigned d;
    d = 0;
    for (int unsigned l = 0; (npe >> l) > 0; l++)
      if (pe_active(j, npe, l)) d++;
    return d;
  endfunction

endpackage
