// sort_unit: N-element combinational sorting unit (N a power of two, >= 2).
//
// Built recursively from five sorting units of half the size, M = N/2:
//   lo/hi : sort d_i[0 +: M] and d_i[M +: M] into two ordered sequences X, Y
//   hi   : sorts the larger halves of X and Y; its larger half is the
//           largest M/2 elements of the whole input, in order
//   lo : sorts the smaller halves of X and Y; its smaller half is the
//           smallest M/2 elements, in order
//   mid   : sorts the smaller half of 'hi' with the larger half of 'lo';
//           these are the middle M elements, in order
// For N = 2 the unit is a single sort2. A 32-element unit thus holds 625
// two-element units, 81 of them on the longest path.
//
// Ordering: q_o[0] is the largest element, q_o[N-1] the smallest. The
// recursive five-unit arrangement follows the design; the descending index
// order (largest first) is this implementation's choice.
//
// Lint note: when this module is linted as the top of its own hierarchy, the
// lint run of Verilator reports x, y, hi, lo and mid as undriven. That comes from how it
// treats a module that instantiates itself, not from the circuit: inside
// any parent (sort_lanes, the testbenches) every sub-unit is elaborated and
// drives these arrays, and every output is checked in simulation.
module sort_unit #(
  parameter int unsigned N        = 32,
  parameter int unsigned W        = 32,
  parameter bit          FAST_CMP = 1'b1
) (
  input  logic [W-1:0] d_i [N],
  output logic [W-1:0] q_o [N]
);
  if (N == 2) begin : g_leaf
    sort2 #(.W(W), .FAST_CMP(FAST_CMP)) u_s2 (
      .a_i(d_i[0]), .b_i(d_i[1]), .max_o(q_o[0]), .min_o(q_o[1])
    );
  end else if (N > 2 && (N & (N - 1)) == 0) begin : g_rec
    localparam int unsigned M = N / 2;
    localparam int unsigned Q = M / 2;

    logic [W-1:0] x_in [M], y_in [M], x [M], y [M];
    logic [W-1:0] hi_in [M], lo_in [M], hi [M], lo [M];
    logic [W-1:0] mid_in [M], mid [M];

    always_comb begin
      for (int i = 0; i < M; i++) begin
        x_in[i] = d_i[i];
        y_in[i] = d_i[M + i];
      end
      for (int i = 0; i < Q; i++) begin
        hi_in[i]       = x[i];       // larger half of X
        hi_in[Q + i]   = y[i];       // larger half of Y
        lo_in[i]     = x[Q + i];   // smaller half of X
        lo_in[Q + i] = y[Q + i];   // smaller half of Y
        mid_in[i]       = hi[Q + i]; // smaller half of 'hi'
        mid_in[Q + i]   = lo[i];   // larger half of 'lo'
      end
    end

    sort_unit #(.N(M), .W(W), .FAST_CMP(FAST_CMP)) u_x     (.d_i(x_in),     .q_o(x));
    sort_unit #(.N(M), .W(W), .FAST_CMP(FAST_CMP)) u_y     (.d_i(y_in),     .q_o(y));
    sort_unit #(.N(M), .W(W), .FAST_CMP(FAST_CMP)) u_hi   (.d_i(hi_in),   .q_o(hi));
    sort_unit #(.N(M), .W(W), .FAST_CMP(FAST_CMP)) u_lo (.d_i(lo_in), .q_o(lo));
    sort_unit #(.N(M), .W(W), .FAST_CMP(FAST_CMP)) u_mid   (.d_i(mid_in),   .q_o(mid));

    always_comb begin
      for (int i = 0; i < Q; i++) begin
        q_o[i]         = hi[i];
        q_o[N - Q + i] = lo[Q + i];
      end
      for (int i = 0; i < M; i++) q_o[Q + i] = mid[i];
    end
  end else begin : g_bad
    $error("sort_unit: N must be a power of two >= 2");
  end
endmodule
