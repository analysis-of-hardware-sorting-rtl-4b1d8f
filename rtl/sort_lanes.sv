// sort_lanes: parallel sorting units over the vector register file.
//
// The 32 vector registers are cut into LANES = 32 / ELEM_W bit-slices. Lane l
// takes bits [l*ELEM_W +: ELEM_W] of every register, so each lane holds
// NELEM elements (one per register); a sort_unit orders each lane and the
// sorted elements go back into the same bit positions. ELEM_W = 32 gives one
// 32-bit lane, 16 gives two 16-bit lanes, 8 gives four 8-bit lanes. Register
// 0 receives the largest element of each lane, register NELEM-1 the
// smallest.
//
// Timing: with STAGES = 1 the unit is combinational (valid_o = valid_i in the
// same cycle), for a single-cycle execute stage. With STAGES > 1 the sorted
// result passes through STAGES-1 register stages, so valid_o follows valid_i
// by STAGES-1 clock edges. The registers sit at the output of the network and
// are meant to be redistributed into it by register retiming in synthesis;
// RTL placement inside the network is not modelled. Only the valid chain is
// reset.
//
// The lane split and the write-back to the source bit positions follow the
// design, as do the 28 stages of its pipelined variant; the output-side
// placement of the stage registers is this implementation's choice.
module sort_lanes #(
  parameter int unsigned ELEM_W   = 32,
  parameter int unsigned NELEM    = 32,
  parameter bit          FAST_CMP = 1'b1,
  parameter int unsigned STAGES   = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid_i,
  input  logic [sort_pkg::XLEN-1:0] vin_i  [NELEM],
  output logic                    valid_o,
  output logic [sort_pkg::XLEN-1:0] vout_o [NELEM]
);
  import sort_pkg::*;

  localparam int unsigned LANES = XLEN / ELEM_W;

  logic [XLEN-1:0] sorted [NELEM];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [ELEM_W-1:0] d [NELEM];
    logic [ELEM_W-1:0] q [NELEM];

    always_comb begin
      for (int i = 0; i < NELEM; i++) d[i] = vin_i[i][l*ELEM_W +: ELEM_W];
    end

    sort_unit #(.N(NELEM), .W(ELEM_W), .FAST_CMP(FAST_CMP)) u_sort (.d_i(d), .q_o(q));

    always_comb begin
      for (int i = 0; i < NELEM; i++) sorted[i][l*ELEM_W +: ELEM_W] = q[i];
    end
  end

  if (STAGES <= 1) begin : g_comb
    assign valid_o = valid_i;
    assign vout_o  = sorted;
  end else begin : g_pipe
    logic            vld [STAGES-1];
    logic [XLEN-1:0] dat [STAGES-1][NELEM];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < STAGES - 1; s++) vld[s] <= 1'b0;
      end else begin
        vld[0] <= valid_i;
        for (int s = 1; s < STAGES - 1; s++) vld[s] <= vld[s-1];
      end
    end

    always_ff @(posedge clk) begin
      dat[0] <= sorted;
      for (int s = 1; s < STAGES - 1; s++) dat[s] <= dat[s-1];
    end

    assign valid_o = vld[STAGES-2];
    assign vout_o  = dat[STAGES-2];
  end
endmodule
