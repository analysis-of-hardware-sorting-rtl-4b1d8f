// sort_hazard: pipeline hold for a multi-cycle SORT in the execute stage.
//
// The processor is in-order, so a SORT that needs STAGES cycles keeps every
// later instruction waiting. While req_i is high (a valid SORT sits in the
// execute stage) a counter runs from 0 to STAGES-1:
//   start_o  in the first cycle (count 0): the sorting lanes take their input;
//   stall_o  in every cycle but the last: hold fetch, decode and execute;
//   done_o   in the last cycle: the result is written back and the pipeline
//            moves on.
// With STAGES = 1 start_o and done_o coincide and stall_o never rises, which
// is the single-cycle (unpipelined) sorting unit. req_i must stay high while
// stall_o is high (checked by an assertion). Counter resets to 0.
//
// Holding the pipeline until the sort completes follows the design; the
// counter-based realisation is this implementation's.
module sort_hazard #(
  parameter int unsigned STAGES = 28
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req_i,
  output logic start_o,
  output logic stall_o,
  output logic done_o
);
  localparam int unsigned CW = (STAGES > 1) ? $clog2(STAGES) : 1;

  logic [CW-1:0] cnt;

  assign start_o = req_i && (cnt == '0);
  assign done_o  = req_i && (cnt == CW'(STAGES - 1));
  assign stall_o = req_i && !done_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (stall_o)  cnt <= cnt + 1'b1;
    else               cnt <= '0;
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n) stall_o |=> req_i)
    else $error("sort_hazard: SORT left the execute stage while stalled");
endmodule
