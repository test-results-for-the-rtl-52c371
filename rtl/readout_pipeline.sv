// readout_pipeline: ring buffer of slice data awaiting a Level-1 accept.
//
// One W-bit slice is written per bunch crossing (at the bc_ph = 1 edge) at a
// free-running write index; every pipeline of the module is reset together,
// so the index is the same everywhere and names a crossing. The Readout
// Controller reads with `rd_idx`; the slice comes out one clock later.
// LAT_OFFSET is added to the read index so that a source that is LAT_OFFSET
// crossings later in the processing chain returns the results that belong to
// the same input crossing. Pipelines for slice data on the InputFPGAs and the
// MainProcessor follow the module description; the depth and the shared
// index scheme are this design's choices.
module readout_pipeline
  import jem_pkg::*;
#(
  parameter int W          = IN_SLICE_W,
  parameter int DEPTH      = PIPE_DEPTH,
  parameter int LAT_OFFSET = 0
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     bc_ph,
  input  logic [W-1:0]             din,
  input  logic [$clog2(DEPTH)-1:0] rd_idx,
  output logic [W-1:0]             dout,
  output logic [$clog2(DEPTH)-1:0] wr_idx
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] raddr;

  assign raddr = rd_idx + AW'(LAT_OFFSET);

  always_ff @(posedge clk) begin
    if (rst) wr_idx <= '0;
    else if (bc_ph) wr_idx <= wr_idx + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (bc_ph) mem[wr_idx] <= din;
    dout <= mem[raddr];
  end

endmodule
