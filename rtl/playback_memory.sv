// playback_memory: test-pattern memory in front of an InputFPGA data path.
//
// N_CH channels of DEPTH words each are loaded over VME (one word per write:
// channel, address, data). A `start` pulse (TTC broadcast or VME) makes the
// memory play its DEPTH words, one per bunch crossing, from address 0;
// `active` is high while it plays and the InputFPGA then uses `pb_data`
// instead of the live LVDS words. After the last word the live data returns.
//
// Timing: `pb_data` is registered; the first word appears on the crossing
// after the one in which `start` was seen, together with `active`.
// The 256-word depth, VME filling and command start follow the module
// description; single-pass playback is this design's choice.
module playback_memory
  import jem_pkg::*;
#(
  parameter int DEPTH = PB_DEPTH,
  parameter int CH    = N_CH,
  parameter int W     = LVDS_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     bc_ph,
  input  logic                     wr_en,
  input  logic [$clog2(CH)-1:0]    wr_ch,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [W-1:0]             wr_data,
  input  logic                     start,
  output logic                     active,
  output logic [W-1:0]             pb_data [CH]
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [CH][DEPTH];
  logic [AW-1:0] rd_addr;
  logic          start_seen;

  always_ff @(posedge clk)
    if (wr_en) mem[wr_ch][wr_addr] <= wr_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      active     <= 1'b0;
      rd_addr    <= '0;
      start_seen <= 1'b0;
    end else begin
      if (start) start_seen <= 1'b1;
      if (bc_ph) begin
        if (start || start_seen) begin
          active     <= 1'b1;
          rd_addr    <= AW'(1);
          start_seen <= 1'b0;
        end else if (active) begin
          if (rd_addr == '0) active <= 1'b0;  // wrapped: all words played
          rd_addr <= rd_addr + 1'b1;
        end
      end
    end
  end

  // read address for the word leaving in the next crossing
  logic [AW-1:0] raddr;
  assign raddr = (start || start_seen) ? '0 : rd_addr;

  always_ff @(posedge clk)
    if (bc_ph)
      for (int c = 0; c < CH; c++) pb_data[c] <= mem[c][raddr];

endmodule
