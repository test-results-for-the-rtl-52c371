// spy_memory: captures a run of result words for read-back over VME.
//
// A `start` pulse (the same playback/spy command that starts the playback
// memories) arms the memory; from the next crossing on it stores one W-bit
// word per bunch crossing (or per `we` strobe when PER_BC = 0) until DEPTH
// words are stored, then it stops and `full` is set. `rd_addr` reads a word,
// registered, one clock later.
//
// Spy memories further down the chain, filled on a playback/spy cycle and
// read over VME, follow the module description; the depth and single-shot
// capture are this design's choices.
module spy_memory #(
  parameter int W      = 64,
  parameter int DEPTH  = 256,
  parameter bit PER_BC = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     bc_ph,
  input  logic                     we,
  input  logic                     start,
  input  logic [W-1:0]             din,
  output logic                     busy,
  output logic                     full,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [W-1:0]             rd_data
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] waddr;
  logic          step;

  assign step = PER_BC ? bc_ph : we;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      full  <= 1'b0;
      waddr <= '0;
    end else if (start) begin
      busy  <= 1'b1;
      full  <= 1'b0;
      waddr <= '0;
    end else if (busy && step) begin
      waddr <= waddr + 1'b1;
      if (waddr == AW'(DEPTH - 1)) begin
        busy <= 1'b0;
        full <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy && step) mem[waddr] <= din;
    rd_data <= mem[rd_addr];
  end

endmodule
