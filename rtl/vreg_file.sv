// vreg_file: vector register file of the decode stage.
//
// Holds NREG vector registers of XLEN bits, NREG type registers of TYPE_W
// bits (the data type held in each vector register) and one global vector
// length register. Ports:
//   - one element write port (we_i/waddr_i/wdata_i) and one asynchronous
//     element read port (raddr_i/rdata_o) for vector loads and stores;
//   - a type-register write/read port and a vector-length write port;
//   - all_o presents every vector register at once to the sorting lanes, and
//     bulk_we_i/bulk_i writes every vector register in one cycle with the
//     sorted result. A bulk write takes priority over an element write in the
//     same cycle (the pipeline is held while a sort is in flight, so the two
//     should not meet; an assertion checks this).
// Writes take effect at the rising clock edge; reset clears everything.
//
// The register counts and widths and the full-width sort access follow the
// design; the port set, the reset and the VL_W width are this
// implementation's choices. The type and length registers are stored for the
// vector instructions; the sort instruction does not consult them.
module vreg_file #(
  parameter int unsigned NREG   = 32,
  parameter int unsigned XLEN   = 32,
  parameter int unsigned TYPE_W = 16,
  parameter int unsigned VL_W   = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we_i,
  input  logic [$clog2(NREG)-1:0] waddr_i,
  input  logic [XLEN-1:0]         wdata_i,
  input  logic [$clog2(NREG)-1:0] raddr_i,
  output logic [XLEN-1:0]         rdata_o,
  input  logic                    twe_i,
  input  logic [$clog2(NREG)-1:0] taddr_i,
  input  logic [TYPE_W-1:0]       twdata_i,
  output logic [TYPE_W-1:0]       trdata_o,
  input  logic                    vlwe_i,
  input  logic [VL_W-1:0]         vl_i,
  output logic [VL_W-1:0]         vl_o,
  output logic [XLEN-1:0]         all_o  [NREG],
  input  logic                    bulk_we_i,
  input  logic [XLEN-1:0]         bulk_i [NREG]
);
  logic [XLEN-1:0]   vreg  [NREG];
  logic [TYPE_W-1:0] vtype [NREG];
  logic [VL_W-1:0]   vl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) vreg[i] <= '0;
    end else if (bulk_we_i) begin
      vreg <= bulk_i;
    end else if (we_i) begin
      vreg[waddr_i] <= wdata_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) vtype[i] <= '0;
      vl <= '0;
    end else begin
      if (twe_i)  vtype[taddr_i] <= twdata_i;
      if (vlwe_i) vl <= vl_i;
    end
  end

  assign rdata_o  = vreg[raddr_i];
  assign trdata_o = vtype[taddr_i];
  assign vl_o     = vl;
  assign all_o    = vreg;

  a_no_write_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(bulk_we_i && we_i))
    else $error("vreg_file: element write during a sort write-back");
endmodule
