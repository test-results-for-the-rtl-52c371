// main_processor: the MainProcessor FPGA of the Jet/Energy Module.
//
// It receives the multiplexed 5-bit jet-element words of its own 11
// InputFPGAs (eta columns 1..4 of phi rows 0..10) and, over the backplane,
// eta column 0 from the lower-eta neighbour and columns 5..6 from the
// higher-eta neighbour. je_demux rebuilds the 11 x 7 array of 10-bit jet
// elements, which feeds the jet algorithm and the energy summation in
// parallel. The energy sums are quad-linear encoded; the encoded energy
// word and the jet multiplicities are registered onto the backplane towards
// the Common Merger Modules. A spy memory captures these results on a
// playback/spy command, and two readout pipelines keep the slice data
// (Et, Ex, Ey, multiplicities) and the RoI data for the Readout Controller.
//
// Timing, in bunch crossings after the jet-element words are on the wire:
// array +1, jet and energy results +3, encoded energy +4, backplane outputs
// +5. Pipelines are written with LAT_OFFSET = 4 relative to the InputFPGA
// slices so that one read index returns the inputs and results of the same
// crossing. Function and partitioning follow the module description; the
// stage split is this design's.
module main_processor
  import jem_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        bc_ph,
  input  logic [MUX_W-1:0]            je_mux_in [N_INFPGA][N_JE],
  input  logic [MUX_W-1:0]            bp_in_lo  [N_PHI],
  input  logic [MUX_W-1:0]            bp_in_hi  [N_PHI][2],
  input  jem_cfg_t                    cfg,
  input  logic                        spy_start,
  input  logic [7:0]                  spy_rd_addr,
  output logic [63:0]                 spy_rd_data,
  output logic                        spy_busy,
  output logic [EWORD_W-1:0]          cmm_energy,
  output logic [N_THR*MULT_W-1:0]     cmm_jet,
  input  logic [PIPE_AW-1:0]          rd_idx,
  output logic [MAIN_SLICE_W-1:0]     rd_slice,
  output logic [ROI_W-1:0]            rd_roi
);

  localparam int PIPE_LAT = 4;

  // ---------------- demultiplexing ----------------
  logic [JE_W-1:0] je [N_PHI][N_ETA];

  for (genvar p = 0; p < N_PHI; p++) begin : g_row
    logic [MUX_W-1:0] m [N_ETA];
    logic [JE_W-1:0]  d [N_ETA];
    always_comb begin
      m[0] = bp_in_lo[p];
      for (int e = 0; e < N_JE; e++) m[e + ETA0] = je_mux_in[p][e];
      m[5] = bp_in_hi[p][0];
      m[6] = bp_in_hi[p][1];
    end
    je_demux #(.N(N_ETA)) u_demux (.clk, .rst, .bc_ph, .mux(m), .je(d));
    always_comb
      for (int e = 0; e < N_ETA; e++) je[p][e] = d[e];
  end

  // ---------------- algorithms ----------------
  logic [N_THR-1:0][MULT_W-1:0]   mult;
  logic [N_ROI-1:0]               roi_max;
  logic [N_ROI-1:0][N_THR-1:0]    roi_hits;
  logic [ET_W-1:0]                et;
  logic signed [EXY_W-1:0]        ex, ey;
  logic [EWORD_W-1:0]             eword;
  logic [N_THR*MULT_W-1:0]        mult_q;

  jet_algorithm u_jet (
    .clk, .rst, .bc_ph, .je,
    .thr (cfg.thr), .win (cfg.win),
    .mult, .roi_max, .roi_hits
  );

  energy_sum u_energy (
    .clk, .rst, .bc_ph, .je,
    .quadrant (cfg.quadrant), .loopback (cfg.loopback),
    .et, .ex, .ey
  );

  quadlinear_encoder u_enc (.clk, .rst, .bc_ph, .et, .ex, .ey, .word(eword));

  // align multiplicities with the encoded energy, then drive the backplane
  always_ff @(posedge clk) begin
    if (rst) begin
      mult_q     <= '0;
      cmm_jet    <= '0;
      cmm_energy <= EWORD_W'(1) << 24;
    end else if (bc_ph) begin
      mult_q     <= mult;
      cmm_jet    <= mult_q;
      cmm_energy <= eword;
    end
  end

  // ---------------- spy memory ----------------
  logic spy_full_unused;
  spy_memory #(.W(64), .DEPTH(SPY_DEPTH), .PER_BC(1'b1)) u_spy (
    .clk, .rst, .bc_ph, .we (1'b0), .start (spy_start),
    .din     ({15'd0, cmm_jet, cmm_energy}),
    .busy    (spy_busy), .full (spy_full_unused),
    .rd_addr (spy_rd_addr), .rd_data (spy_rd_data)
  );

  // ---------------- readout pipelines ----------------
  logic [ROI_W-1:0] roi_slice;
  always_comb
    for (int r = 0; r < N_ROI; r++) roi_slice[r*(N_THR+1) +: N_THR+1] = {roi_max[r], roi_hits[r]};

  logic [PIPE_AW-1:0] wr0_unused, wr1_unused;
  readout_pipeline #(.W(MAIN_SLICE_W), .DEPTH(PIPE_DEPTH), .LAT_OFFSET(PIPE_LAT)) u_pipe (
    .clk, .rst, .bc_ph,
    .din    ({mult, ey, ex, et}),
    .rd_idx (rd_idx), .dout (rd_slice), .wr_idx (wr0_unused)
  );
  readout_pipeline #(.W(ROI_W), .DEPTH(PIPE_DEPTH), .LAT_OFFSET(PIPE_LAT)) u_roi_pipe (
    .clk, .rst, .bc_ph,
    .din    (roi_slice),
    .rd_idx (rd_idx), .dout (rd_roi), .wr_idx (wr1_unused)
  );

endmodule
