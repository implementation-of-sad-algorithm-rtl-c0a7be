// folded_tree: N-input parallel-prefix / reduction unit built from N/2 PEs.
//
// The binary tree of N-1 nodes over N inputs is folded back onto N/2 PEs:
// at the leaf level all PEs are active, each taking one input pair; at every
// higher level only the last half of the previously active PEs work, reading
// the registered outputs of the PEs (possibly themselves) that served the
// level below. With 8 inputs, PE1 and PE2 are used once, PE3 twice and PE4
// three times, and the PEs keep 1, 1, 2 and 3 Lsave values. This schedule,
// the trunk phase (save L, pass L+R up) and the twig phase (start with the
// identity 0 at the root, pass S to the left child and S+Lsave to the right
// child) are those of the folded-tree architecture. After the twig phase the
// two outputs of PE j hold the exclusive prefix sums of inputs 2j and 2j+1:
// for inputs 3 1 2 0 4 1 1 3 the total is 15 and the prefixes are
// 0 3 4 6 6 10 11 12.
//
// In SAD mode the inputs are read as pairs (X, Y) and the leaves take |X-Y|,
// so total is the row SAD; no twig phase is run.
//
// Interface: din is sampled in the cycle start is accepted (ready high).
// total is valid while total_valid is high (LEVELS cycles after start);
// prefix is valid while prefix_valid is high (2*LEVELS cycles after start)
// and holds until the next start. Inputs are DW bits wide and zero-extended
// to the OW-bit datapath; the default OW = DW + log2(N) cannot overflow for
// the reduction.
module folded_tree
  import ft_pkg::*;
#(
  parameter int unsigned N  = 8,                 // inputs (leaves), power of two
  parameter int unsigned DW = 4,                 // input width
  parameter int unsigned OW = DW + $clog2(N)     // datapath / output width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          sad_mode,
  input  logic [DW-1:0] din    [N],
  output logic          ready,
  output logic [OW-1:0] total,
  output logic          total_valid,
  output logic [OW-1:0] prefix [N],
  output logic          prefix_valid
);

  localparam int unsigned NPE    = N / 2;
  localparam int unsigned LEVELS = $clog2(N);

  ft_phase_e        phase;
  logic [RF_AW-1:0] lvl;
  pe_instr_t        instr [NPE];
  logic [OW-1:0]    pe_a  [NPE];
  logic [OW-1:0]    pe_b  [NPE];
  logic [OW-1:0]    out_l [NPE];
  logic [OW-1:0]    out_r [NPE];

  ft_ctrl #(.NPE(NPE)) u_ctrl (
    .clk, .rst_n, .start, .sad_mode, .ready,
    .phase, .lvl, .instr, .total_valid, .prefix_valid
  );

  // Operand routing: the feedback interconnect of the folded tree.
  always_comb begin
    int unsigned base, pbase, k, src;
    for (int unsigned j = 0; j < NPE; j++) begin
      pe_a[j] = '0;
      pe_b[j] = '0;
      pbase   = 0;
      src     = 0;
      base    = NPE - (NPE >> lvl);            // first PE active at this level
      k       = j - base;                      // node position within the level
      if (phase == PH_TRUNK) begin
        if (lvl == '0) begin
          pe_a[j] = OW'(din[2*j]);
          pe_b[j] = OW'(din[2*j+1]);
        end else if (j >= base) begin
          pbase   = NPE - (NPE >> (lvl - 1));  // PEs that served the level below
          pe_a[j] = out_l[(pbase + 2*k) % NPE];
          pe_b[j] = out_l[(pbase + 2*k + 1) % NPE];
        end
      end else if (phase == PH_TWIG) begin
        if (int'(lvl) == LEVELS - 1) begin
          pe_a[j] = '0;                         // identity enters at the root
        end else if (j >= base) begin
          pbase   = NPE - (NPE >> (lvl + 1));  // PEs serving the parent level
          src     = (pbase + k / 2) % NPE;
          pe_a[j] = (k % 2 == 0) ? out_l[src] : out_r[src];
        end
      end
    end
  end

  for (genvar j = 0; j < NPE; j++) begin : g_pe
    pe #(.W(OW), .RF_DEPTH(pe_rf_depth(j, NPE))) u_pe (
      .clk, .rst_n,
      .instr (instr[j]),
      .a     (pe_a[j]),
      .b     (pe_b[j]),
      .out_l (out_l[j]),
      .out_r (out_r[j])
    );
    assign prefix[2*j]   = out_l[j];
    assign prefix[2*j+1] = out_r[j];
  end

  assign total = out_l[NPE-1];

endmodule
