// sort2: two-element sorting unit, the building block of every sorting unit.
//
// One comparator decides A < B; its output drives the select of two
// multiplexers. Select 0 (A >= B): Max = A, Min = B. Select 1 (A < B):
// Max = B, Min = A. Elements are unsigned. Combinational.
//
// With FAST_CMP = 0 the comparator is a plain '<' (left to synthesis); with
// FAST_CMP = 1 it is the look-ahead fast comparator (fast_cmp), used with its
// inputs swapped, since B > A is the same as A < B. FAST_CMP = 1 needs W to
// be 8, 16 or 32. The comparator-plus-two-muxes structure and the mux input
// order follow the design; unsigned elements are this implementation's
// choice.
module sort2 #(
  parameter int unsigned W        = 32,
  parameter bit          FAST_CMP = 1'b1
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] max_o,
  output logic [W-1:0] min_o
);
  logic a_lt_b;

  if (FAST_CMP) begin : g_fast
    fast_cmp #(.W(W)) u_cmp (.a_i(b_i), .b_i(a_i), .gt_o(a_lt_b));
  end else begin : g_plain
    assign a_lt_b = a_i < b_i;
  end

  assign max_o = a_lt_b ? b_i : a_i;
  assign min_o = a_lt_b ? a_i : b_i;
endmodule
