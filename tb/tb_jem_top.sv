// tb_jem_top: end-to-end test of one Jet/Energy Module at full size.
//
// The testbench plays the PreProcessor (LVDS words on four DLL phases, only
// one phase clean), the two neighbouring modules (multiplexed backplane
// words), the TTC system (L1A, BCR, broadcast commands) and the VME crate
// CPU. Every crossing's inputs are kept, and the reference models predict
// the real-time outputs towards the Common Merger Modules and the readout
// packets. Phases of the run:
//   1. VME configuration and LVDS sync calibration (must lock on phase 1);
//   2. random data with parity errors and masked channels, with Level-1
//      accepts reading out 5 and 1 slices (DAQ and Level-2 packets checked);
//   3. latency measurement: one energy deposit after empty crossings must
//      reach `cmm_energy` exactly 8 crossings later;
//   4. loopback of the backplane with the energy sum over the duplicated
//      channels and a 0..511 counter in one channel;
//   5. a playback/spy cycle started by a TTC broadcast: playback patterns
//      in all 88 channels, outputs checked, spy memory read over VME;
//   6. a bunch-counter reset followed by an accept (BCN in the header).
// Each mechanism is counted; one that never happened is a failure.
module tb_jem_top;
  import jem_pkg::*;
  import jem_ref_pkg::*;

  localparam int LAT_RT = 8;   // real-time latency, crossings
  localparam int NB_LAT = 3;   // crossings from LVDS word to its backplane word

  logic clk = 0, rst = 1, bc_ph = 0;
  logic [LVDS_W-1:0] lvds_ph [N_INFPGA][N_CH][N_PH];
  logic [MUX_W-1:0] bp_in_lo [N_PHI], bp_out_hi [N_PHI];
  logic [MUX_W-1:0] bp_in_hi [N_PHI][2], bp_out_lo [N_PHI][2];
  logic ttc_l1a = 0, ttc_bcr = 0, ttc_brc_str = 0;
  logic [5:0] ttc_brc = '0;
  logic [15:0] vme_addr = '0, vme_wdata = '0, vme_rdata;
  logic vme_we = 0, vme_re = 0, vme_rvalid;
  logic [EWORD_W-1:0] cmm_energy;
  logic [N_THR*MULT_W-1:0] cmm_jet;
  logic [15:0] daq_data, roi_data;
  logic daq_valid, daq_first, daq_last, roi_valid, roi_first, roi_last;

  jem_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) bc_ph <= ~bc_ph;

  int checks = 0, failures = 0;
  int bc = 0;
  always @(posedge clk) if (bc_ph && !rst) bc <= bc + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL @%0d: %s", bc, what);
    end
  endtask

  // ---------------- mechanisms ----------------
  int n_lock = 0, n_perr = 0, n_mask = 0, n_l1a = 0, n_multi = 0, n_roi_words = 0;
  int n_loop = 0, n_pb = 0, n_spy = 0, n_bcr = 0, n_sat = 0, n_max = 0, n_latency = 0;
  int n_rt = 0, n_drop_free = 0;

  // ---------------- model state ----------------
  int thr_v [8], win_v [8];
  int quadrant = 1;
  bit loopback = 0;
  logic [N_CH-1:0] mask_v [N_INFPGA];
  int  nb [int][N_PHI][3];                    // neighbour elements: col 0, 5, 6
  typedef logic [N_INFPGA-1:0][IN_SLICE_W-1:0] in_rec_t;
  in_rec_t in_hist [int];
  je_arr_t arr_hist [int];
  logic [48:0] exp_rt [int];                  // {mult, energy word} by input crossing

  // --- compute and record the model of input crossing c from its words
  task automatic model(int c, logic [LVDS_W-1:0] w [N_INFPGA][N_CH], int nbv [N_PHI][3]);
    je_arr_t a;
    int et, ex, ey;
    jet_res_t r;
    logic [23:0] m;
    in_rec_t rec;
    for (int f = 0; f < N_INFPGA; f++) begin
      int e [N_CH];
      for (int ch = 0; ch < N_CH; ch++) begin
        bit bad = ^w[f][ch];
        e[ch] = (bad || mask_v[f][ch]) ? 0 : int'(w[f][ch][8:0]);
        rec[f][ch*10 +: 10] = {bad, 9'(e[ch])};
        if (bad) n_perr++;
        if (mask_v[f][ch] && w[f][ch][8:0] != 0) n_mask++;
      end
      for (int j = 0; j < N_JE; j++) a[f][j + 1] = e[j] + e[j + 4];
    end
    in_hist[c] = rec;
    for (int p = 0; p < N_PHI; p++) begin
      if (loopback) begin
        a[p][0] = a[p][4];
        a[p][5] = a[p][1];
        a[p][6] = a[p][2];
      end else begin
        a[p][0] = nbv[p][0];
        a[p][5] = nbv[p][1];
        a[p][6] = nbv[p][2];
      end
      for (int k = 0; k < 3; k++) nb[c][p][k] = nbv[p][k];
    end
    arr_hist[c] = a;
    energy_ref(a, quadrant, loopback, et, ex, ey);
    r = jet_ref(a, thr_v, win_v);
    for (int t = 0; t < 8; t++) begin
      m[t*3 +: 3] = 3'(r.mult[t]);
      if (r.mult[t] == 7) n_sat++;
    end
    for (int i = 0; i < N_ROI; i++) if (r.is_max[i]) n_max++;
    exp_rt[c] = {m, qword(et, ex, ey)};
  endtask

  function automatic logic [LVDS_W-1:0] lvds_word(int e, bit bad);
    logic [8:0] d = 9'(e);
    return {(^d) ^ bad, d};
  endfunction

  // --- drive one crossing of LVDS words (data on phase 1 only)
  task automatic drive(logic [LVDS_W-1:0] w [N_INFPGA][N_CH]);
    for (int f = 0; f < N_INFPGA; f++)
      for (int ch = 0; ch < N_CH; ch++)
        for (int p = 0; p < N_PH; p++)
          lvds_ph[f][ch][p] = (p == 1) ? w[f][ch] : LVDS_W'($urandom);
  endtask

  task automatic next_bc();
    @(posedge clk iff bc_ph);
    @(negedge clk);
  endtask

  // random crossing: falling energy distribution, some parity errors
  task automatic random_crossing(int density, int perr_rate);
    logic [LVDS_W-1:0] w [N_INFPGA][N_CH];
    int nbv [N_PHI][3];
    for (int f = 0; f < N_INFPGA; f++)
      for (int ch = 0; ch < N_CH; ch++) begin
        int u = int'($urandom % 1000);
        int e = ($urandom % 100 < density) ? (u * u / 1000) * u / 1000 * 511 / 1000 : 0;
        w[f][ch] = lvds_word(e, perr_rate > 0 && ($urandom % perr_rate) == 0);
      end
    for (int p = 0; p < N_PHI; p++)
      for (int k = 0; k < 3; k++) nbv[p][k] = ($urandom % 100 < density) ? int'($urandom % 1023) : 0;
    drive(w);
    model(bc, w, nbv);
    next_bc();
  endtask

  task automatic quiet(int n);
    logic [LVDS_W-1:0] w [N_INFPGA][N_CH];
    int nbv [N_PHI][3];
    for (int f = 0; f < N_INFPGA; f++) for (int ch = 0; ch < N_CH; ch++) w[f][ch] = '0;
    for (int p = 0; p < N_PHI; p++) nbv[p] = '{0, 0, 0};
    repeat (n) begin
      drive(w);
      model(bc, w, nbv);
      next_bc();
    end
  endtask

  // ---------------- backplane: neighbours or loopback plug ----------------
  logic [MUX_W-1:0] drv_lo [N_PHI];
  logic [MUX_W-1:0] drv_hi [N_PHI][2];
  always @(negedge clk) begin
    int c, sh;
    c  = bc - NB_LAT;
    sh = bc_ph ? 5 : 0;   // second half carries the high bits
    for (int p = 0; p < N_PHI; p++) begin
      if (nb.exists(c)) begin
        drv_lo[p]    = MUX_W'(nb[c][p][0] >> sh);
        drv_hi[p][0] = MUX_W'(nb[c][p][1] >> sh);
        drv_hi[p][1] = MUX_W'(nb[c][p][2] >> sh);
      end else begin
        drv_lo[p]    = '0;
        drv_hi[p][0] = '0;
        drv_hi[p][1] = '0;
      end
    end
  end
  always_comb
    for (int p = 0; p < N_PHI; p++) begin
      bp_in_lo[p]    = loopback ? bp_out_hi[p]    : drv_lo[p];
      bp_in_hi[p][0] = loopback ? bp_out_lo[p][0] : drv_hi[p][0];
      bp_in_hi[p][1] = loopback ? bp_out_lo[p][1] : drv_hi[p][1];
    end

  // ---------------- real-time output check ----------------
  bit rt_check = 0;
  always @(negedge clk) if (!bc_ph && !rst && rt_check && exp_rt.exists(bc - LAT_RT)) begin
    check(cmm_energy == exp_rt[bc - LAT_RT][24:0],
          $sformatf("energy word of crossing %0d: %h exp %h", bc - LAT_RT, cmm_energy, exp_rt[bc - LAT_RT][24:0]));
    check(cmm_jet == exp_rt[bc - LAT_RT][48:25], $sformatf("multiplicities of crossing %0d: %h exp %h",
          bc - LAT_RT, cmm_jet, exp_rt[bc - LAT_RT][48:25]));
    n_rt++;
  end

  // ---------------- VME ----------------
  task automatic vwrite(logic [15:0] a, logic [15:0] d);
    @(negedge clk);
    vme_addr = a; vme_wdata = d; vme_we = 1;
    @(negedge clk);
    vme_we = 0;
  endtask

  task automatic vread(logic [15:0] a, output logic [15:0] d);
    @(negedge clk);
    vme_addr = a; vme_re = 1;
    @(negedge clk);
    vme_re = 0;
    @(negedge clk);
    d = vme_rdata;
  endtask

  // ---------------- readout ----------------
  int latency = 40, nsl = 5;
  int bcn_base = 0;           // crossing of the last BCR
  logic [15:0] exp_daq [$][$];
  logic [15:0] exp_roi [$][$];
  logic [15:0] got [$], got_roi [$];
  logic [17:0] daq_log [$];
  int n_daq = 0, n_roi_pkt = 0;

  // L1A in the current crossing; the packets are computed from the model
  task automatic accept();
    int c = bc;
    int idx_c = c - latency;             // pipeline index of the accepted crossing
    int bcn = (c - bcn_base) % ORBIT_BC;
    logic [15:0] pkt [$];
    logic [15:0] rp [$];
    int cnt = 0;
    jet_res_t r;
    pkt.push_back({4'hA, 12'(bcn)});
    pkt.push_back(16'(nsl));
    for (int s = 0; s < nsl; s++) begin
      int n = idx_c - (nsl - 1) / 2 + s - 2;   // input crossing held at that index
      logic [959:0] sl;
      int et, ex, ey;
      energy_ref(arr_hist[n], quadrant, loopback, et, ex, ey);
      r = jet_ref(arr_hist[n], thr_v, win_v);
      begin
        in_rec_t rec;
        rec = in_hist[n];
        sl[879:0] = rec;
      end
      begin
        logic [48:0] rt;
        logic [23:0] mu;
        rt = exp_rt[n];
        mu = rt[48:25];
        sl[959 -: 80] = {9'd0, mu, 16'(ey), 16'(ex), 15'(et)};
      end
      for (int w = 0; w < 60; w++) pkt.push_back(sl[w*16 +: 16]);
    end
    exp_daq.push_back(pkt);
    r = jet_ref(arr_hist[idx_c - 2], thr_v, win_v);
    rp.push_back({4'hB, 12'(bcn)});
    for (int i = 0; i < N_ROI; i++) begin
      logic [7:0] h;
      for (int t = 0; t < 8; t++) h[t] = r.hit[i][t];
      if (h != 0) begin
        rp.push_back({3'd0, 5'(i), h});
        cnt++;
      end
    end
    rp.push_back({4'hE, 6'd0, 6'(cnt)});
    exp_roi.push_back(rp);
    n_roi_words += cnt;
    if (nsl > 1) n_multi++;
    n_l1a++;
    ttc_l1a = 1;
    @(negedge clk);
    @(negedge clk);
    ttc_l1a = 0;
  endtask

  always @(posedge clk) if (!rst) begin
    if (daq_valid) begin
      daq_log.push_back({daq_first, daq_last, daq_data});
      got.push_back(daq_data);
      if (daq_last) begin
        check(exp_daq.size() > 0, "DAQ packet expected");
        if (exp_daq.size() > 0) begin
          logic [15:0] e [$];
          e = exp_daq.pop_front();
          check(got.size() == e.size(), $sformatf("DAQ packet length %0d exp %0d", got.size(), e.size()));
          for (int i = 0; i < e.size() && i < got.size(); i++)
            check(got[i] == e[i], $sformatf("DAQ word %0d: %h exp %h", i, got[i], e[i]));
        end
        got.delete();
        n_daq++;
      end
    end
    if (roi_valid) begin
      got_roi.push_back(roi_data);
      if (roi_last) begin
        check(exp_roi.size() > 0, "RoI packet expected");
        if (exp_roi.size() > 0) begin
          logic [15:0] e [$];
          e = exp_roi.pop_front();
          check(got_roi.size() == e.size(), "RoI packet length");
          for (int i = 0; i < e.size() && i < got_roi.size(); i++)
            check(got_roi[i] == e[i], $sformatf("RoI word %0d: %h exp %h", i, got_roi[i], e[i]));
        end
        got_roi.delete();
        n_roi_pkt++;
      end
    end
  end

  // ---------------- test sequence ----------------
  logic [15:0] d;
  logic [LVDS_W-1:0] pbw [N_INFPGA][N_CH][PB_DEPTH];

  initial begin
    for (int f = 0; f < N_INFPGA; f++) begin
      mask_v[f] = '0;
      for (int ch = 0; ch < N_CH; ch++) for (int p = 0; p < N_PH; p++) lvds_ph[f][ch][p] = '0;
    end
    for (int t = 0; t < 8; t++) begin
      thr_v[t] = 40 + 150 * t;
      win_v[t] = t % 3;
    end
    repeat (4) next_bc();
    rst = 0;
    // ---- 1. configuration and calibration
    for (int t = 0; t < 8; t++) vwrite(A_THR0 + 16'(t), 16'(thr_v[t]));
    begin
      logic [15:0] wv;
      wv = '0;
      for (int t = 0; t < 8; t++) wv[t*2 +: 2] = 2'(win_v[t]);
      vwrite(A_WIN, wv);
    end
    vwrite(A_QUADRANT, 16'(quadrant));
    vwrite(A_LATENCY, 16'(latency));
    vwrite(A_NSLICES, 16'(nsl));
    vwrite(A_CTRL, 16'h0001);
    for (int i = 0; i < 24; i++) begin
      for (int f = 0; f < N_INFPGA; f++)
        for (int ch = 0; ch < N_CH; ch++)
          for (int p = 0; p < N_PH; p++)
            lvds_ph[f][ch][p] = (p == 1 || p == 2) ? ((i % 2) ? SYNC_B : SYNC_A) : LVDS_W'($urandom);
      next_bc();
    end
    vwrite(A_CTRL, 16'h0000);
    repeat (3) next_bc();
    vread(A_STATUS, d);
    check(d[0], $sformatf("all 88 channels locked, status %h", d));
    if (d[0]) n_lock++;
    // ---- 2. random data, parity errors, masks, readout
    quiet(12);
    rt_check = 1;
    for (int i = 0; i < 150; i++) begin
      random_crossing(40, 30);
      if (i == 100 || i == 120) accept();
    end
    // mask two channels (configuration change between quiet periods)
    rt_check = 0;
    quiet(4);
    mask_v[3] = 8'b0001_0001;
    mask_v[7] = 8'b1000_0000;
    vwrite(A_MASK0 + 16'd3, 16'(mask_v[3]));
    vwrite(A_MASK0 + 16'd7, 16'(mask_v[7]));
    quiet(12);
    rt_check = 1;
    for (int i = 0; i < 150; i++) begin
      random_crossing(60, 0);
      if (i == 90) accept();
    end
    nsl = 1;
    vwrite(A_NSLICES, 16'(nsl));
    for (int i = 0; i < 60; i++) begin
      random_crossing(50, 0);
      if (i == 50) accept();
    end
    // isolated peaks on a two-element grid: eight maxima, saturating multiplicities
    for (int i = 0; i < 20; i++) begin
      logic [LVDS_W-1:0] w [N_INFPGA][N_CH];
      int nbv [N_PHI][3];
      for (int f = 0; f < N_INFPGA; f++) for (int ch = 0; ch < N_CH; ch++) w[f][ch] = '0;
      for (int p = 0; p < N_PHI; p++) nbv[p] = '{0, 0, 0};
      for (int f = 2; f < 10; f += 2)
        for (int ch = 1; ch < 4; ch += 2) w[f][ch] = lvds_word(200 + 20 * f + 5 * ch + i, 0);
      drive(w);
      model(bc, w, nbv);
      if (i == 10) accept();
      next_bc();
    end
    // ---- 3. latency measurement
    rt_check = 0;
    quiet(16);
    begin
      logic [LVDS_W-1:0] w [N_INFPGA][N_CH];
      int nbv [N_PHI][3];
      int start, seen;
      for (int f = 0; f < N_INFPGA; f++) for (int ch = 0; ch < N_CH; ch++) w[f][ch] = '0;
      for (int p = 0; p < N_PHI; p++) nbv[p] = '{0, 0, 0};
      w[4][1] = lvds_word(300, 0);
      start = bc;
      drive(w);
      model(bc, w, nbv);
      next_bc();
      quiet(1);
      seen = -1;
      for (int k = 1; k < 16 && seen < 0; k++) begin
        if (cmm_energy[23:0] != 0) seen = bc - start;
        else quiet(1);
      end
      check(seen == LAT_RT, $sformatf("real-time latency %0d crossings, expected %0d", seen, LAT_RT));
      if (seen == LAT_RT) n_latency++;
    end
    quiet(12);
    // ---- 4. backplane loopback
    loopback = 1;
    vwrite(A_CTRL, 16'h0002);
    quiet(12);
    rt_check = 1;
    for (int v = 0; v < 512; v++) begin
      logic [LVDS_W-1:0] w [N_INFPGA][N_CH];
      int nbv [N_PHI][3];
      for (int f = 0; f < N_INFPGA; f++) for (int ch = 0; ch < N_CH; ch++) w[f][ch] = '0;
      for (int p = 0; p < N_PHI; p++) nbv[p] = '{0, 0, 0};
      // em of column 1 of row 5: goes out to the lower neighbour, returns as column 5
      w[5][0] = lvds_word(v, 0);
      drive(w);
      model(bc, w, nbv);
      if (v > 0) check(arr_hist[bc][5][5] == v, "loopback element in the model");
      next_bc();
      n_loop++;
    end
    rt_check = 0;
    loopback = 0;
    vwrite(A_CTRL, 16'h0000);
    quiet(12);
    // ---- 5. playback/spy cycle by TTC broadcast
    for (int f = 0; f < N_INFPGA; f++)
      for (int ch = 0; ch < N_CH; ch++)
        for (int a = 0; a < PB_DEPTH; a++) begin
          int u;
          u = int'($urandom % 1000);
          pbw[f][ch][a] = lvds_word((u * u / 1000) * 511 / 1000, ($urandom % 200) == 0);
          @(negedge clk);
          vme_addr = {1'b1, 4'(f), 3'(ch), 8'(a)};
          vme_wdata = 16'(pbw[f][ch][a]);
          vme_we = 1;
        end
    @(negedge clk);
    vme_we = 0;
    quiet(12);
    rt_check = 1;
    begin
      int s, log_base;
      int nbv [N_PHI][3];
      s = bc;
      log_base = daq_log.size();
      for (int p = 0; p < N_PHI; p++) nbv[p] = '{0, 0, 0};
      ttc_brc = BRC_PBSPY;
      ttc_brc_str = 1;
      @(negedge clk);
      ttc_brc_str = 0;
      for (int k = 0; k < PB_DEPTH; k++) begin
        logic [LVDS_W-1:0] w [N_INFPGA][N_CH];
        for (int f = 0; f < N_INFPGA; f++) for (int ch = 0; ch < N_CH; ch++) w[f][ch] = pbw[f][ch][k];
        model(s + k, w, nbv);
      end
      next_bc();
      // live inputs carry other data: the playback must win
      for (int k = 1; k < PB_DEPTH; k++) begin
        for (int f = 0; f < N_INFPGA; f++)
          for (int ch = 0; ch < N_CH; ch++)
            for (int p = 0; p < N_PH; p++) lvds_ph[f][ch][p] = LVDS_W'($urandom);
        if (k == 200) accept();
        next_bc();
        n_pb++;
      end
      quiet(12);
      // spy memory: word k holds the outputs during crossing s+1+k
      for (int k = 0; k < SPY_DEPTH; k++) begin
        logic [63:0] sw;
        for (int part = 0; part < 4; part++) begin
          vread({4'h4, 2'b00, 2'(part), 8'(k)}, d);
          sw[part*16 +: 16] = d;
        end
        if (exp_rt.exists(s + 1 + k - LAT_RT)) begin
          check(sw == {15'd0, exp_rt[s + 1 + k - LAT_RT]}, $sformatf("spy word %0d", k));
          n_spy++;
        end
      end
      // ROC spy: first words of the DAQ stream since the start
      for (int k = 0; k < 8; k++) begin
        logic [17:0] rw;
        vread({4'h5, 4'd0, 8'(k)}, d);
        rw[15:0] = d;
        vread({4'h5, 4'd1, 8'(k)}, d);
        rw[17:16] = d[1:0];
        check(rw == daq_log[log_base + k], $sformatf("ROC spy word %0d", k));
      end
    end
    // ---- 6. bunch-counter reset, then an accept
    @(negedge clk iff bc_ph);
    ttc_bcr = 1;
    @(negedge clk);
    @(negedge clk);
    ttc_bcr = 0;
    bcn_base = bc;
    n_bcr++;
    for (int i = 0; i < 60; i++) begin
      random_crossing(50, 0);
      if (i == 50) accept();
    end
    quiet(20);
    repeat (800) next_bc();
    check(exp_daq.size() == 0 && exp_roi.size() == 0, "all packets arrived");
    vread(A_STATUS, d);
    check(d[15:8] == 0, "no accept dropped");
    check(d[2] == (n_perr > 0), $sformatf("parity-error flag in the status word: %h", d));
    if (d[15:8] == 0) n_drop_free++;
    $display("mechanisms: lock %0d parity %0d masked %0d rt-checks %0d latency %0d loopback %0d playback %0d spy %0d",
             n_lock, n_perr, n_mask, n_rt, n_latency, n_loop, n_pb, n_spy);
    $display("            l1a %0d multi-slice %0d roi-words %0d daq %0d roi %0d bcr %0d saturated %0d maxima %0d",
             n_l1a, n_multi, n_roi_words, n_daq, n_roi_pkt, n_bcr, n_sat, n_max);
    check(n_lock > 0 && n_perr > 0 && n_mask > 0 && n_rt > 0 && n_latency > 0, "sync, parity, mask, latency exercised");
    check(n_loop > 0 && n_pb > 0 && n_spy > 0 && n_bcr > 0, "loopback, playback, spy, BCR exercised");
    check(n_l1a > 0 && n_multi > 0 && n_roi_words > 0 && n_daq == n_l1a && n_roi_pkt == n_l1a,
          "readout exercised");
    check(n_max > 0 && n_sat > 0, "jet maxima and saturated multiplicities exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
