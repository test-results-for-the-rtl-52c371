// jem_top: one Jet/Energy Module (JEM) of the ATLAS Level-1 Jet/Energy
// Processor.
//
// 88 LVDS channels (electromagnetic and hadronic energies of 44 jet
// elements, 11 phi rows x 4 eta columns) enter 11 InputFPGAs. Their
// multiplexed 5-bit jet-element words go to the MainProcessor and, for the
// boundary columns, to the neighbouring modules over the backplane; the
// MainProcessor adds the neighbours' columns, finds jets and sums energies,
// and drives the real-time results towards the Common Merger Modules. On a
// Level-1 accept the Readout Controller sends the slice data to the DAQ and
// the RoIs to Level-2. The Control-FPGA holds the VME registers and decodes
// the TTC signals.
//
// Clocking: `clk` is the 80 MHz clock derived from the 40 MHz TTC clock;
// `bc_ph` is high during the second 80 MHz cycle of each 25 ns bunch
// crossing, and all 40 MHz logic advances at the clock edge that ends it.
// Chips that carry no logic of this design are outside: the LVDS
// deserialisers (`lvds_ph`: each channel's 10-bit word sampled on the four
// DLL clock phases), the TTCrx (`ttc_*`), the G-Link transmitters (`daq_*`,
// `roi_*` word streams) and the backplane (`bp_*`). Real-time latency from a
// word on `lvds_ph` to the encoded energy on `cmm_energy` is 8 bunch
// crossings.
//
// Backplane: `bp_out_lo` (eta columns 1..2, i.e. InputFPGA elements 0..1)
// goes to the lower-eta neighbour, `bp_out_hi` (column 4) to the higher-eta
// neighbour; `bp_in_lo` becomes column 0 and `bp_in_hi` columns 5..6. A
// loopback plug connects bp_in_lo = bp_out_hi and bp_in_hi = bp_out_lo.
module jem_top
  import jem_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     bc_ph,
  input  logic [LVDS_W-1:0]        lvds_ph  [N_INFPGA][N_CH][N_PH],
  input  logic [MUX_W-1:0]         bp_in_lo [N_PHI],
  input  logic [MUX_W-1:0]         bp_in_hi [N_PHI][2],
  output logic [MUX_W-1:0]         bp_out_lo [N_PHI][2],
  output logic [MUX_W-1:0]         bp_out_hi [N_PHI],
  input  logic                     ttc_l1a,
  input  logic                     ttc_bcr,
  input  logic [5:0]               ttc_brc,
  input  logic                     ttc_brc_str,
  input  logic [15:0]              vme_addr,
  input  logic [15:0]              vme_wdata,
  input  logic                     vme_we,
  input  logic                     vme_re,
  output logic [15:0]              vme_rdata,
  output logic                     vme_rvalid,
  output logic [EWORD_W-1:0]       cmm_energy,
  output logic [N_THR*MULT_W-1:0]  cmm_jet,
  output logic [15:0]              daq_data,
  output logic                     daq_valid,
  output logic                     daq_first,
  output logic                     daq_last,
  output logic [15:0]              roi_data,
  output logic                     roi_valid,
  output logic                     roi_first,
  output logic                     roi_last
);

  jem_cfg_t           cfg;
  logic [BCN_W-1:0]   bcn;
  logic               pbspy_start;
  logic               pb_wr_en [N_INFPGA];
  logic [2:0]         pb_wr_ch;
  logic [7:0]         pb_wr_addr;
  logic [LVDS_W-1:0]  pb_wr_data;
  logic [7:0]         spy_rd_addr;
  logic [63:0]        main_spy_data;
  logic [17:0]        roc_spy_data;
  logic [7:0]         roc_dropped;
  logic [PIPE_AW-1:0] rd_idx;

  logic [MUX_W-1:0]   je_mux [N_INFPGA][N_JE];
  logic [N_CH-1:0]    locked [N_INFPGA];
  logic [N_CH-1:0]    perr   [N_INFPGA];
  logic [N_INFPGA-1:0] pb_active;
  logic [IN_SLICE_W-1:0] in_slice [N_INFPGA];
  logic [MAIN_SLICE_W-1:0] main_slice;
  logic [ROI_W-1:0]   roi_slice;
  logic               main_spy_busy;

  // ---------------- InputFPGAs ----------------
  for (genvar f = 0; f < N_INFPGA; f++) begin : g_in
    logic [MUX_W-1:0] m [N_JE];
    input_fpga u_in (
      .clk, .rst, .bc_ph,
      .ph_data    (lvds_ph[f]),
      .calib      (cfg.calib),
      .mask       (cfg.mask[f]),
      .pb_start   (pbspy_start),
      .pb_wr_en   (pb_wr_en[f]),
      .pb_wr_ch, .pb_wr_addr, .pb_wr_data,
      .locked     (locked[f]),
      .parity_err (perr[f]),
      .pb_active  (pb_active[f]),
      .je_mux     (m),
      .rd_idx,
      .rd_slice   (in_slice[f])
    );
    always_comb begin
      for (int j = 0; j < N_JE; j++) je_mux[f][j] = m[j];
      bp_out_lo[f][0] = m[0];
      bp_out_lo[f][1] = m[1];
      bp_out_hi[f]    = m[3];
    end
  end

  logic all_locked;
  always_comb begin
    all_locked = 1'b1;
    for (int f = 0; f < N_INFPGA; f++) all_locked &= &locked[f];
  end

  // ---------------- MainProcessor ----------------
  main_processor u_main (
    .clk, .rst, .bc_ph,
    .je_mux_in   (je_mux),
    .bp_in_lo, .bp_in_hi,
    .cfg,
    .spy_start   (pbspy_start),
    .spy_rd_addr,
    .spy_rd_data (main_spy_data),
    .spy_busy    (main_spy_busy),
    .cmm_energy, .cmm_jet,
    .rd_idx,
    .rd_slice    (main_slice),
    .rd_roi      (roi_slice)
  );

  // ---------------- Readout Controller ----------------
  logic [SLICE_W-1:0] slice;
  always_comb begin
    for (int f = 0; f < N_INFPGA; f++) slice[f*IN_SLICE_W +: IN_SLICE_W] = in_slice[f];
    slice[SLICE_W-1 -: 80] = 80'(main_slice);
  end

  readout_controller u_roc (
    .clk, .rst, .bc_ph,
    .l1a         (ttc_l1a),
    .bcn,
    .l1a_latency (cfg.l1a_latency),
    .n_slices    (cfg.n_slices),
    .rd_idx,
    .slice_in    (slice),
    .roi_in      (roi_slice),
    .daq_data, .daq_valid, .daq_first, .daq_last,
    .roi_data, .roi_valid, .roi_first, .roi_last,
    .spy_start   (pbspy_start),
    .spy_rd_addr,
    .spy_rd_data (roc_spy_data),
    .dropped     (roc_dropped)
  );

  // ---------------- Control-FPGA ----------------
  logic perr_any;
  always_comb begin
    perr_any = 1'b0;
    for (int f = 0; f < N_INFPGA; f++) perr_any |= |perr[f];
  end

  control_fpga u_ctrl (
    .clk, .rst, .bc_ph,
    .vme_addr, .vme_wdata, .vme_we, .vme_re, .vme_rdata, .vme_rvalid,
    .ttc_bcr, .ttc_brc, .ttc_brc_str,
    .cfg, .bcn, .pbspy_start,
    .pb_wr_en, .pb_wr_ch, .pb_wr_addr, .pb_wr_data,
    .spy_rd_addr,
    .main_spy_data, .roc_spy_data,
    .all_locked,
    .pb_active   (|pb_active),
    .parity_err  (perr_any),
    .spy_busy    (main_spy_busy),
    .roc_dropped
  );

endmodule
