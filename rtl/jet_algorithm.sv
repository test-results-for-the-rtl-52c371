// jet_algorithm: sliding-window jet finder of the MainProcessor.
//
// Input is the 11 (phi) x 7 (eta) array of 10-bit jet elements, the 8 x 4
// core at rows 1..8, columns 1..4. Stage 1 forms every 2x2 sum (10 x 6
// positions), and for each of the 32 core 2x2 positions its 3x3 window (the
// largest of the four 3x3 windows that contain the 2x2) and its 4x4 window
// (the 2x2 at its centre). Stage 2 marks a core 2x2 as an RoI candidate when
// it is a local maximum among its eight neighbouring 2x2 sums; to give one
// maximum when neighbours are equal it must be strictly greater than the
// neighbours above-left (lower phi, or same phi and lower eta) and greater
// or equal to the others. For a local maximum, the window chosen for each of
// the 8 thresholds (2x2, 3x3 or 4x4, per threshold) is compared with that
// threshold (sum > threshold). Per threshold the number of passing
// candidates is counted into a 3-bit multiplicity that saturates at 7.
//
// Timing: both stages advance once per bunch crossing (bc_ph = 1), so the
// outputs belong to the jet elements of two crossings earlier. The window
// sizes, the local-maximum test over the 4x8 core, 8 programmable thresholds
// and 3-bit multiplicities follow the module description. The tie rule, the
// window placement and the ">" comparison are this design's choices, and the
// algorithm runs once per crossing on demultiplexed jet elements rather than
// on the 80 MHz half-words.
module jet_algorithm
  import jem_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     bc_ph,
  input  logic [JE_W-1:0]          je   [N_PHI][N_ETA],
  input  logic [N_THR-1:0][JS_W-1:0] thr,
  input  logic [N_THR-1:0][1:0]    win,
  output logic [N_THR-1:0][MULT_W-1:0] mult,
  output logic [N_ROI-1:0]         roi_max,
  output logic [N_ROI-1:0][N_THR-1:0] roi_hits
);

  localparam int NP2 = N_PHI - 1;  // 2x2 positions in phi
  localparam int NE2 = N_ETA - 1;

  // ---------------- stage 1: window sums ----------------
  logic [JS_W-1:0] s2 [NP2][NE2];
  logic [JS_W-1:0] s3 [N_PHI_CORE][N_ETA_CORE];
  logic [JS_W-1:0] s4 [N_PHI_CORE][N_ETA_CORE];

  function automatic logic [JS_W-1:0] wsum(input logic [JE_W-1:0] a [N_PHI][N_ETA],
                                           input int p0, input int e0, input int n);
    logic [JS_W-1:0] s;
    s = '0;
    for (int p = 0; p < n; p++)
      for (int e = 0; e < n; e++)
        s = s + JS_W'(a[p0 + p][e0 + e]);
    return s;
  endfunction

  logic [JS_W-1:0] s2_c [NP2][NE2];
  logic [JS_W-1:0] s3_c [N_PHI_CORE][N_ETA_CORE];
  logic [JS_W-1:0] s4_c [N_PHI_CORE][N_ETA_CORE];

  always_comb begin
    for (int p = 0; p < NP2; p++)
      for (int e = 0; e < NE2; e++)
        s2_c[p][e] = wsum(je, p, e, 2);
    for (int p = 0; p < N_PHI_CORE; p++)
      for (int e = 0; e < N_ETA_CORE; e++) begin
        // 2x2 origin at (p+PHI0, e+ETA0); 3x3 origins at offsets -1..0
        s3_c[p][e] = '0;
        for (int dp = -1; dp <= 0; dp++)
          for (int de = -1; de <= 0; de++) begin
            logic [JS_W-1:0] t;
            t = wsum(je, p + PHI0 + dp, e + ETA0 + de, 3);
            if (t > s3_c[p][e]) s3_c[p][e] = t;
          end
        s4_c[p][e] = wsum(je, p + PHI0 - 1, e + ETA0 - 1, 4);
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < NP2; p++)
        for (int e = 0; e < NE2; e++) s2[p][e] <= '0;
      for (int p = 0; p < N_PHI_CORE; p++)
        for (int e = 0; e < N_ETA_CORE; e++) begin
          s3[p][e] <= '0;
          s4[p][e] <= '0;
        end
    end else if (bc_ph) begin
      s2 <= s2_c;
      s3 <= s3_c;
      s4 <= s4_c;
    end
  end

  // ---------------- stage 2: local maximum, thresholds, counting ----------------
  logic [N_ROI-1:0]              max_c;
  logic [N_ROI-1:0][N_THR-1:0]   hits_c;
  logic [N_THR-1:0][MULT_W-1:0]  mult_c;

  always_comb begin
    for (int p = 0; p < N_PHI_CORE; p++)
      for (int e = 0; e < N_ETA_CORE; e++) begin
        int r;
        logic m;
        logic [JS_W-1:0] c;
        r = p * N_ETA_CORE + e;
        c = s2[p + PHI0][e + ETA0];
        m = 1'b1;
        for (int dp = -1; dp <= 1; dp++)
          for (int de = -1; de <= 1; de++) begin
            logic [JS_W-1:0] n;
            n = s2[p + PHI0 + dp][e + ETA0 + de];
            if (dp < 0 || (dp == 0 && de < 0)) begin
              if (!(c > n)) m = 1'b0;
            end else if (dp > 0 || de > 0) begin
              if (!(c >= n)) m = 1'b0;
            end
          end
        max_c[r] = m;
        for (int t = 0; t < N_THR; t++) begin
          logic [JS_W-1:0] w;
          case (win_t'(win[t]))
            WIN_2X2: w = c;
            WIN_3X3: w = s3[p][e];
            default: w = s4[p][e];
          endcase
          hits_c[r][t] = m && (w > thr[t]);
        end
      end
    for (int t = 0; t < N_THR; t++) begin
      int cnt;
      cnt = 0;
      for (int r = 0; r < N_ROI; r++) cnt += int'(hits_c[r][t]);
      mult_c[t] = (cnt > 7) ? 3'd7 : 3'(cnt);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mult     <= '0;
      roi_max  <= '0;
      roi_hits <= '0;
    end else if (bc_ph) begin
      mult     <= mult_c;
      roi_max  <= max_c;
      roi_hits <= hits_c;
    end
  end

endmodule
