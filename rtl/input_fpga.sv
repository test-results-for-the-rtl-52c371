// input_fpga: one InputFPGA of the Jet/Energy Module.
//
// It handles one phi row: eight LVDS channels, the electromagnetic (0..3) and
// hadronic (4..7) energies of four eta columns. Per channel an lvds_sync
// stage picks the DLL clock phase; a playback memory can replace the live
// words by test patterns. Each 10-bit word is a 9-bit energy (bits 8:0) with
// an even-parity bit (bit 9). A parity error or a set mask bit forces the
// channel's energy to zero. The em and had energies of a column are added to
// a 10-bit jet element, which je_mux sends as two 5-bit words at 80 MHz to
// the MainProcessor and, for the boundary columns, onto the backplane. The
// checked energies and the parity-error flags form the readout slice kept
// in a readout_pipeline.
//
// Timing (bunch crossings after the word is on ph_data): phase-selected word
// +1, checked energy and pipeline input +2, multiplexed words on the wire
// during +3. Channel counts, parity check, masking, em+had summing, playback
// and the 5-bit 80 MHz output follow the module description; the parity
// sense, channel order and stage split are this design's choices.
module input_fpga
  import jem_pkg::*;
#(
  parameter int LOCK_BC = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     bc_ph,
  // LVDS words on the four clock phases
  input  logic [LVDS_W-1:0]        ph_data [N_CH][N_PH],
  // configuration
  input  logic                     calib,
  input  logic [N_CH-1:0]          mask,
  input  logic                     pb_start,
  input  logic                     pb_wr_en,
  input  logic [2:0]               pb_wr_ch,
  input  logic [7:0]               pb_wr_addr,
  input  logic [LVDS_W-1:0]        pb_wr_data,
  // status
  output logic [N_CH-1:0]          locked,
  output logic [N_CH-1:0]          parity_err,
  output logic                     pb_active,
  // multiplexed jet elements
  output logic [MUX_W-1:0]         je_mux [N_JE],
  // readout
  input  logic [PIPE_AW-1:0]       rd_idx,
  output logic [IN_SLICE_W-1:0]    rd_slice
);

  logic [LVDS_W-1:0] sync_data [N_CH];
  logic [LVDS_W-1:0] pb_data   [N_CH];
  logic [1:0]        phase     [N_CH];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    lvds_sync #(.LOCK_BC(LOCK_BC)) u_sync (
      .clk, .rst, .bc_ph, .calib,
      .ph_data (ph_data[c]),
      .data    (sync_data[c]),
      .phase   (phase[c]),
      .locked  (locked[c])
    );
  end

  playback_memory #(.DEPTH(PB_DEPTH), .CH(N_CH), .W(LVDS_W)) u_pb (
    .clk, .rst, .bc_ph,
    .wr_en   (pb_wr_en),
    .wr_ch   (pb_wr_ch),
    .wr_addr (pb_wr_addr),
    .wr_data (pb_wr_data),
    .start   (pb_start),
    .active  (pb_active),
    .pb_data (pb_data)
  );

  // parity check and mask
  logic [E_W-1:0] e_q [N_CH];
  logic [N_CH-1:0] perr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < N_CH; c++) e_q[c] <= '0;
      perr_q <= '0;
    end else if (bc_ph) begin
      for (int c = 0; c < N_CH; c++) begin
        logic [LVDS_W-1:0] w;
        w = pb_active ? pb_data[c] : sync_data[c];
        perr_q[c] <= ^w;
        e_q[c]    <= (^w || mask[c]) ? '0 : w[E_W-1:0];
      end
    end
  end

  assign parity_err = perr_q;

  // jet elements
  logic [JE_W-1:0] je [N_JE];
  always_comb
    for (int j = 0; j < N_JE; j++) je[j] = JE_W'(e_q[j]) + JE_W'(e_q[j + N_JE]);

  je_mux #(.N(N_JE)) u_mux (.clk, .rst, .bc_ph, .je(je), .mux(je_mux));

  // readout slice: per channel {parity error, energy}
  logic [IN_SLICE_W-1:0] slice;
  always_comb
    for (int c = 0; c < N_CH; c++) slice[c*(E_W+1) +: E_W+1] = {perr_q[c], e_q[c]};

  logic [PIPE_AW-1:0] wr_idx_unused;
  readout_pipeline #(.W(IN_SLICE_W), .DEPTH(PIPE_DEPTH), .LAT_OFFSET(0)) u_pipe (
    .clk, .rst, .bc_ph,
    .din    (slice),
    .rd_idx (rd_idx),
    .dout   (rd_slice),
    .wr_idx (wr_idx_unused)
  );

endmodule
