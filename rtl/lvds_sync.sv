// lvds_sync: input synchronisation stage of one LVDS channel.
//
// The deserialised 10-bit word of a channel is sampled on four DLL clock
// phases. While `calib` is high the PreProcessor sends a switching pattern
// (SYNC_A, SYNC_B alternating). For every phase the block counts how many
// consecutive crossings showed a correct pattern word that differs from the
// previous one; a phase that reaches LOCK_BC is marked "good" until the next
// calibration starts (so the pattern may stop shortly before `calib` falls).
// When calibration ends
// the block selects a good phase whose two neighbours (cyclically) are also
// good, i.e. one away from the edges of the data eye, or else the first good
// phase, and asserts `locked`. Outside calibration it forwards, registered,
// the word of the selected phase.
//
// Timing: all registers advance once per bunch crossing (bc_ph = 1 at the
// 80 MHz clock edge that ends the crossing); `data` is one crossing after
// `ph_data`. The four phases and automatic selection on a sync pattern follow
// the module description; the pattern values, the lock count and the
// centre-of-eye choice are this design's own.
module lvds_sync
  import jem_pkg::*;
#(
  parameter int LOCK_BC = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  bc_ph,
  input  logic                  calib,
  input  logic [LVDS_W-1:0]     ph_data [N_PH],
  output logic [LVDS_W-1:0]     data,
  output logic [1:0]            phase,
  output logic                  locked
);

  localparam int CW = $clog2(LOCK_BC + 1);

  logic [LVDS_W-1:0] prev  [N_PH];
  logic [CW-1:0]     good_cnt [N_PH];
  logic [N_PH-1:0]   good;
  logic              calib_q;

  // phase choice: prefer a good phase with good neighbours
  logic [1:0] best;
  logic       any_good;
  always_comb begin
    best = '0;
    any_good = 1'b0;
    for (int p = N_PH - 1; p >= 0; p--)
      if (good[p]) begin
        best = 2'(p);
        any_good = 1'b1;
      end
    for (int p = N_PH - 1; p >= 0; p--)
      if (good[p] && good[(p + 1) % N_PH] && good[(p + N_PH - 1) % N_PH]) best = 2'(p);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < N_PH; p++) begin
        prev[p]     <= '0;
        good_cnt[p] <= '0;
      end
      calib_q <= 1'b0;
      good    <= '0;
      phase   <= '0;
      locked  <= 1'b0;
      data    <= '0;
    end else if (bc_ph) begin
      calib_q <= calib;
      if (calib) begin
        locked <= 1'b0;
        for (int p = 0; p < N_PH; p++) begin
          prev[p] <= ph_data[p];
          if (!calib_q) begin
            good[p]     <= 1'b0;             // new calibration
            good_cnt[p] <= '0;
          end else if ((ph_data[p] == SYNC_A || ph_data[p] == SYNC_B) && ph_data[p] != prev[p]) begin
            if (good_cnt[p] == CW'(LOCK_BC - 1)) good[p] <= 1'b1;
            if (good_cnt[p] != CW'(LOCK_BC)) good_cnt[p] <= good_cnt[p] + 1'b1;
          end else begin
            good_cnt[p] <= '0;
          end
        end
      end else if (calib_q) begin
        // calibration just ended: commit the phase choice
        phase  <= best;
        locked <= any_good;
        for (int p = 0; p < N_PH; p++) good_cnt[p] <= '0;
      end
      data <= ph_data[phase];
    end
  end

endmodule
