// tb_main_processor: self-checking test of the MainProcessor.
//
// The testbench multiplexes random 11 x 7 jet-element arrays onto the 5-bit
// inputs itself (own columns 1..4 from the InputFPGA links, column 0 and
// columns 5..6 from the backplane inputs), in normal and loopback mode and
// for two quadrants. It checks the backplane outputs, 5 crossings after the
// words were on the wire, against the reference models (quad-linear energy
// word and multiplicities), reads the readout pipelines back (slice and RoI
// data for the same crossing through one index), and runs a spy capture.
module tb_main_processor;
  import jem_pkg::*;
  import jem_ref_pkg::*;
  localparam int LAT = 5;
  logic clk = 0, rst = 1, bc_ph = 0;
  logic [MUX_W-1:0] je_mux_in [N_INFPGA][N_JE];
  logic [MUX_W-1:0] bp_in_lo [N_PHI];
  logic [MUX_W-1:0] bp_in_hi [N_PHI][2];
  jem_cfg_t cfg;
  logic spy_start = 0, spy_busy;
  logic [7:0] spy_rd_addr = '0;
  logic [63:0] spy_rd_data;
  logic [EWORD_W-1:0] cmm_energy;
  logic [N_THR*MULT_W-1:0] cmm_jet;
  logic [PIPE_AW-1:0] rd_idx = '0;
  logic [MAIN_SLICE_W-1:0] rd_slice;
  logic [ROI_W-1:0] rd_roi;

  int checks = 0, failures = 0, bc = 0;
  logic [63:0] exp_out [int];               // {jet, energy} by crossing on the wire
  logic [MAIN_SLICE_W-1:0] exp_slice [int]; // by pipeline read index
  logic [ROI_W-1:0] exp_roi [int];
  int t_thr [8], t_win [8];

  always #5 clk = ~clk;
  always @(posedge clk) bc_ph <= ~bc_ph;
  always @(posedge clk) if (bc_ph && !rst) bc <= bc + 1;

  main_processor dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) if (!bc_ph && !rst && exp_out.exists(bc - LAT)) begin
    check(cmm_energy == exp_out[bc - LAT][24:0], $sformatf("energy word crossing %0d: %h vs %h",
          bc - LAT, cmm_energy, exp_out[bc - LAT][24:0]));
    check(cmm_jet == exp_out[bc - LAT][48:25], $sformatf("multiplicities crossing %0d", bc - LAT));
  end

  // put one array on the wire during the current crossing
  task automatic send(je_arr_t a);
    for (int half = 0; half < 2; half++) begin
      for (int p = 0; p < N_PHI; p++) begin
        bp_in_lo[p] = MUX_W'(a[p][0] >> (5 * half));
        for (int e = 0; e < N_JE; e++) je_mux_in[p][e] = MUX_W'(a[p][e + 1] >> (5 * half));
        bp_in_hi[p][0] = MUX_W'(a[p][5] >> (5 * half));
        bp_in_hi[p][1] = MUX_W'(a[p][6] >> (5 * half));
      end
      @(negedge clk);
    end
  endtask

  task automatic crossing(je_arr_t a);
    int et, ex, ey;
    jet_res_t r;
    logic [23:0] m;
    logic [ROI_W-1:0] roi;
    energy_ref(a, int'(cfg.quadrant), cfg.loopback, et, ex, ey);
    r = jet_ref(a, t_thr, t_win);
    for (int t = 0; t < 8; t++) m[t*3 +: 3] = 3'(r.mult[t]);
    for (int i = 0; i < N_ROI; i++) begin
      roi[i*9 + 8] = r.is_max[i];
      for (int t = 0; t < 8; t++) roi[i*9 + t] = r.hit[i][t];
    end
    exp_out[bc] = {15'd0, m, qword(et, ex, ey)};
    // written at the end of crossing bc+3 with offset 4
    exp_slice[(bc - 1) % PIPE_DEPTH] = {m, 16'(ey), 16'(ex), 15'(et)};
    exp_roi[(bc - 1) % PIPE_DEPTH] = roi;
    send(a);
  endtask

  je_arr_t a;
  logic [63:0] spy_exp [256];
  int spy_bc;

  initial begin
    cfg = '0;
    for (int t = 0; t < 8; t++) begin
      t_thr[t] = 50 + 120 * t;
      t_win[t] = t % 3;
      cfg.thr[t] = JS_W'(t_thr[t]);
      cfg.win[t] = 2'(t_win[t]);
    end
    for (int p = 0; p < N_PHI; p++) a[p] = '{0, 0, 0, 0, 0, 0, 0};
    repeat (4) @(posedge clk iff bc_ph);
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      if (i == 100) cfg.quadrant = 2'd3;
      if (i == 200) cfg.loopback = 1'b1;
      if (i == 100 || i == 200) begin   // reconfiguration: flush
        exp_out.delete();
        repeat (6) send(a);
      end
      if (i == 50) begin
        spy_start = 1;
        spy_bc = bc + 1;
      end
      for (int p = 0; p < N_PHI; p++)
        for (int e = 0; e < N_ETA; e++)
          a[p][e] = ($urandom % 3 == 0) ? int'($urandom % 1023) : 0;
      crossing(a);
      spy_start = 0;
    end
    // pipelines: read back the last 100 crossings
    for (int back = 8; back < 100; back++) begin
      int idx = (bc - back) % PIPE_DEPTH;
      rd_idx = PIPE_AW'(idx);
      @(negedge clk);
      if (exp_slice.exists(idx)) begin
        check(rd_slice == exp_slice[idx], $sformatf("slice index %0d", idx));
        check(rd_roi == exp_roi[idx], $sformatf("RoI index %0d", idx));
      end
    end
    // spy: the word of crossing k on the wire is captured LAT crossings later
    wait (!spy_busy);
    for (int k = 0; k < 256; k++) begin
      spy_rd_addr = 8'(k);
      @(negedge clk);
      if (exp_out.exists(spy_bc + k - LAT))
        check(spy_rd_data == exp_out[spy_bc + k - LAT], $sformatf("spy word %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
