// fast_cmp: W-bit fast magnitude comparator, W = 8, 16 or 32.
//
// A tree of 4-bit fast compare units. The first level compares every nibble
// of A and B; each nibble yields a pair of flags (A>B, A<B) that are never
// both high. The flags of a group of nibbles form two small numbers
// G = {gt flags} and L = {lt flags}, and G > L exactly when the most
// significant differing nibble has A above B, so a further compare unit on
// (G, L) combines them:
//   W = 8 : 2 nibble units  -> fast_cmp2                       (two levels)
//   W = 16: 4 nibble units  -> fast_cmp4                       (two levels)
//   W = 32: 8 nibble units  -> 2 x fast_cmp4 -> fast_cmp2      (three levels)
// The output is gt_o = 1 if A>B, 0 if A<B or A == B. Combinational.
//
// The tree shapes for 8, 16 and 32 bits follow the design; other widths are
// rejected at elaboration.
module fast_cmp #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic         gt_o
);
  localparam int unsigned NNIB = W / 4;

  logic [NNIB-1:0] nib_gt, nib_lt;

  for (genvar i = 0; i < NNIB; i++) begin : g_nib
    fast_cmp4 u_nib (
      .a_i (a_i[4*i +: 4]),
      .b_i (b_i[4*i +: 4]),
      .lt_o(nib_lt[i]),
      .gt_o(nib_gt[i])
    );
  end

  if (W == 8) begin : g_w8
    fast_cmp2 u_top (.a_i(nib_gt), .b_i(nib_lt), .gt_o(gt_o));
  end else if (W == 16) begin : g_w16
    logic lt_unused;
    fast_cmp4 u_top (.a_i(nib_gt), .b_i(nib_lt), .lt_o(lt_unused), .gt_o(gt_o));
  end else if (W == 32) begin : g_w32
    logic [1:0] half_gt, half_lt;
    for (genvar h = 0; h < 2; h++) begin : g_half
      fast_cmp4 u_mid (
        .a_i (nib_gt[4*h +: 4]),
        .b_i (nib_lt[4*h +: 4]),
        .lt_o(half_lt[h]),
        .gt_o(half_gt[h])
      );
    end
    fast_cmp2 u_top (.a_i(half_gt), .b_i(half_lt), .gt_o(gt_o));
  end else begin : g_bad
    $error("fast_cmp: W must be 8, 16 or 32");
  end
endmodule
