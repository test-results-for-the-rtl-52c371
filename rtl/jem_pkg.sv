// jem_pkg: constants and types shared by the Jet/Energy Module (JEM) RTL.
//
// The JEM sees an 11 (phi) x 7 (eta) array of jet elements, of which the
// central 8 x 4 is its core. Each of the 11 InputFPGAs owns one phi row of
// four eta columns (eight LVDS channels: four electromagnetic, four hadronic).
// Eta column 0 and columns 5..6 come from the neighbouring modules over the
// backplane. The array sizes, the 10-bit link and jet-element words, the
// 5-bit multiplexed words, the eight thresholds with 3-bit multiplicities and
// the 256-word playback memories follow the module description; the register
// map, the broadcast command code and all encodings are this design's own.
package jem_pkg;

  localparam int N_PHI      = 11;  // phi rows seen by the jet algorithm
  localparam int N_ETA      = 7;   // eta columns seen by the jet algorithm
  localparam int N_PHI_CORE = 8;
  localparam int N_ETA_CORE = 4;
  localparam int PHI0       = 1;   // first core row
  localparam int ETA0       = 1;   // first core column
  localparam int N_INFPGA   = 11;
  localparam int N_JE       = 4;   // jet elements per InputFPGA
  localparam int N_CH       = 8;   // LVDS channels per InputFPGA
  localparam int N_PH       = 4;   // DLL clock phases

  localparam int LVDS_W = 10;      // 9-bit energy + parity
  localparam int E_W    = 9;
  localparam int JE_W   = 10;      // jet element (em + had)
  localparam int MUX_W  = 5;       // backplane word at 80 MHz
  localparam int JS_W   = 14;      // window sums (16 x 1023 < 2^14)
  localparam int N_THR  = 8;
  localparam int MULT_W = 3;
  localparam int N_ROI  = N_PHI_CORE * N_ETA_CORE;

  localparam int ET_W = 15;        // 32 x 1023 < 2^15
  localparam int EXY_W = 16;       // signed Ex, Ey
  localparam int EWORD_W = 25;     // encoded energy word

  localparam int PB_DEPTH   = 256;
  localparam int SPY_DEPTH  = 256;
  localparam int PIPE_DEPTH = 128;
  localparam int PIPE_AW    = $clog2(PIPE_DEPTH);
  localparam int MAX_SLICES = 5;
  localparam int BCN_W      = 12;
  localparam int ORBIT_BC   = 3564;

  // switching pattern sent by the PreProcessor during calibration
  localparam logic [LVDS_W-1:0] SYNC_A = 10'h155;
  localparam logic [LVDS_W-1:0] SYNC_B = 10'h2AA;

  // TTC broadcast command that starts a playback/spy cycle
  localparam logic [5:0] BRC_PBSPY = 6'd1;

  typedef enum logic [1:0] {WIN_2X2 = 2'd0, WIN_3X3 = 2'd1, WIN_4X4 = 2'd2} win_t;

  typedef logic [JE_W-1:0] je_t;
  typedef je_t je_array_t [N_PHI][N_ETA];

  // Configuration written over VME, held by the Control-FPGA.
  typedef struct packed {
    logic                         calib;        // LVDS sync calibration mode
    logic                         loopback;     // energy sum of duplicated channels
    logic [1:0]                   quadrant;     // JEP quadrant of this module
    logic [PIPE_AW-1:0]           l1a_latency;  // readout latency in crossings
    logic [2:0]                   n_slices;     // slices per event, 1..5
    logic [N_INFPGA-1:0][N_CH-1:0] mask;        // channel mask bits
    logic [N_THR-1:0][JS_W-1:0]   thr;          // jet thresholds
    logic [N_THR-1:0][1:0]        win;          // window size per threshold (win_t)
  } jem_cfg_t;

  // Slice widths for readout
  localparam int IN_SLICE_W   = N_CH * (E_W + 1);                 // 80
  localparam int MAIN_SLICE_W = ET_W + 2*EXY_W + N_THR*MULT_W;    // 71
  localparam int ROI_W        = N_ROI * (N_THR + 1);              // 288
  localparam int SLICE_W      = N_INFPGA*IN_SLICE_W + 80;         // main padded to 80

  // Register map (16-bit word addresses)
  localparam logic [15:0] A_CTRL     = 16'h0000; // b0 calib, b1 loopback, b2 pb/spy start (self-clearing)
  localparam logic [15:0] A_STATUS   = 16'h0001; // read: b0 all channels locked, b1 playback active
  localparam logic [15:0] A_LATENCY  = 16'h0002;
  localparam logic [15:0] A_NSLICES  = 16'h0003;
  localparam logic [15:0] A_QUADRANT = 16'h0004;
  localparam logic [15:0] A_THR0     = 16'h0010; // .. 0x0017
  localparam logic [15:0] A_WIN      = 16'h0018; // 2 bits per threshold
  localparam logic [15:0] A_MASK0    = 16'h0020; // .. 0x002A, one per InputFPGA
  // 0x8000 | fpga<<11 | ch<<8 | word : playback memory write
  // 0x4000 | part<<8 | word          : MainProcessor spy read, 16-bit part 0..3
  // 0x5000 | part<<8 | word          : ROC spy read, part 0 data, part 1 flags

endpackage
