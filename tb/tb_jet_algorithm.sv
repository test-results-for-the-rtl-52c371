// tb_jet_algorithm: self-checking test of the sliding-window jet finder.
//
// Patterns: random sparse jets with random thresholds and window sizes,
// isolated single-element jets at every core position, equal neighbouring
// 2x2 sums (tie rule), and a lattice of many separated peaks that drives the
// multiplicities to saturation. Outputs two crossings later are compared
// with the reference model; the test also counts that every window size
// produced hits and that saturation occurred.
module tb_jet_algorithm;
  import jem_pkg::*;
  import jem_ref_pkg::*;
  logic clk = 0, rst = 1, bc_ph = 0;
  logic [JE_W-1:0] je [N_PHI][N_ETA];
  logic [N_THR-1:0][JS_W-1:0] thr;
  logic [N_THR-1:0][1:0] win;
  logic [N_THR-1:0][MULT_W-1:0] mult;
  logic [N_ROI-1:0] roi_max;
  logic [N_ROI-1:0][N_THR-1:0] roi_hits;
  int checks = 0, failures = 0;
  int win_hits [3] = '{0, 0, 0};
  int n_sat = 0, n_max = 0;

  always #5 clk = ~clk;
  always @(posedge clk) bc_ph <= ~bc_ph;

  jet_algorithm dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  je_arr_t a;
  int t_thr [8], t_win [8];

  task automatic run();
    jet_res_t r;
    for (int p = 0; p < N_PHI; p++)
      for (int e = 0; e < N_ETA; e++) je[p][e] = JE_W'(a[p][e]);
    for (int t = 0; t < N_THR; t++) begin
      thr[t] = JS_W'(t_thr[t]);
      win[t] = 2'(t_win[t]);
    end
    r = jet_ref(a, t_thr, t_win);
    repeat (2) @(posedge clk iff bc_ph);
    @(negedge clk);
    for (int t = 0; t < N_THR; t++) begin
      check(int'(mult[t]) == r.mult[t], $sformatf("mult[%0d] got %0d exp %0d", t, mult[t], r.mult[t]));
      if (r.mult[t] > 0) win_hits[t_win[t]]++;
      if (r.mult[t] == 7) n_sat++;
    end
    for (int i = 0; i < N_ROI; i++) begin
      check(roi_max[i] == r.is_max[i], $sformatf("max[%0d]", i));
      if (r.is_max[i]) n_max++;
      for (int t = 0; t < N_THR; t++)
        check(roi_hits[i][t] == r.hit[i][t], $sformatf("hit[%0d][%0d]", i, t));
    end
  endtask

  task automatic clear();
    for (int p = 0; p < N_PHI; p++) for (int e = 0; e < N_ETA; e++) a[p][e] = 0;
  endtask

  task automatic rand_cfg();
    for (int t = 0; t < N_THR; t++) begin
      t_thr[t] = int'($urandom % 1200);
      t_win[t] = int'($urandom % 3);
    end
  endtask

  initial begin
    for (int p = 0; p < N_PHI; p++) for (int e = 0; e < N_ETA; e++) je[p][e] = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 0;
    // isolated jets at each core position
    for (int p = 1; p <= 8; p++)
      for (int e = 1; e <= 4; e++) begin
        clear();
        a[p][e] = 200 + int'($urandom % 800);
        rand_cfg();
        run();
      end
    // ties between neighbouring 2x2 windows
    for (int i = 0; i < 20; i++) begin
      clear();
      a[2 + i % 6][2 + i % 3] = 300;
      a[2 + i % 6][3 + i % 3] = 300;
      a[3 + i % 6][2 + i % 3] = (i % 2) ? 300 : 0;
      rand_cfg();
      run();
    end
    // separated peaks rising towards higher phi and eta: eight local
    // maxima in the core, so the multiplicities saturate at 7
    for (int i = 0; i < 10; i++) begin
      clear();
      for (int p = 0; p < N_PHI; p += 2)
        for (int e = 0; e < N_ETA; e += 2) a[p][e] = 100 + 40 * (p + e) + i;
      for (int t = 0; t < N_THR; t++) begin
        t_thr[t] = 20 * t;
        t_win[t] = t % 3;
      end
      run();
    end
    // random sparse data
    for (int i = 0; i < 300; i++) begin
      clear();
      for (int p = 0; p < N_PHI; p++)
        for (int e = 0; e < N_ETA; e++)
          if ($urandom % 5 == 0) a[p][e] = int'($urandom % 1023);
      rand_cfg();
      run();
    end
    for (int w = 0; w < 3; w++) check(win_hits[w] > 0, $sformatf("window size %0d used", w));
    check(n_sat > 0, "multiplicity saturation seen");
    check(n_max > 0, "local maxima seen");
    $display("window hits %0d/%0d/%0d, saturated %0d, maxima %0d",
             win_hits[0], win_hits[1], win_hits[2], n_sat, n_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
