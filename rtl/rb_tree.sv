// rb_tree: RB summing tree.
//
// Adds ROWS redundant-binary numbers of W digits with a balanced binary
// tree of rba cells: ROWS/2 adders in the first level, then ROWS/4, ...,
// log2(ROWS) levels and ROWS-1 adders in all. Each level is one RBA delay,
// independent of W, since an RBA has no carry chain.
//
// The nodes are numbered as a heap: node 0 is the root (the output), node i
// adds nodes 2i+1 and 2i+2, and the ROWS inputs are nodes ROWS-1 ..
// 2*ROWS-2, input r being node ROWS-1+r. Inputs must be canonical RB
// (see rb_cancel); RBA outputs always are. ROWS must be a power of two.
// Purely combinational; the sum is exact modulo 2^W.
module rb_tree #(
  parameter int unsigned ROWS = 8,
  parameter int unsigned W    = 64
) (
  input  logic [ROWS-1:0][W-1:0] xp,
  input  logic [ROWS-1:0][W-1:0] xn,
  output logic [W-1:0]           sp,
  output logic [W-1:0]           sn
);

  localparam int unsigned NODES = 2 * ROWS - 1;

  logic [NODES-1:0][W-1:0] tp, tn;

  for (genvar r = 0; r < ROWS; r++) begin : g_leaf
    assign tp[ROWS-1+r] = xp[r];
    assign tn[ROWS-1+r] = xn[r];
  end

  for (genvar i = 0; i < ROWS - 1; i++) begin : g_node
    rba #(.W(W)) u_rba (
      .xp(tp[2*i+1]), .xn(tn[2*i+1]),
      .yp(tp[2*i+2]), .yn(tn[2*i+2]),
      .sp(tp[i]),     .sn(tn[i])
    );
  end

  assign sp = tp[0];
  assign sn = tn[0];

  if ((ROWS & (ROWS - 1)) != 0 || ROWS < 2) begin : g_bad_rows
    $error("rb_tree: ROWS must be a power of two, at least 2");
  end

endmodule
