// tb_input_fpga: self-checking test of one InputFPGA.
//
// 1. Calibration: the sync pattern is clean on DLL phases 1..3 and noisy on
//    phase 0, so every channel must lock on phase 2; afterwards only phase 2
//    carries the real data.
// 2. Random energies (falling distribution up to 511) with correct parity,
//    about 5% parity errors and a changing mask. The jet elements, received
//    through je_demux, must equal em + had of the unmasked, error-free
//    channels, 4 crossings after the words were on the inputs.
// 3. Readout: recent pipeline entries are read back and compared with the
//    checked energies and parity-error flags.
// 4. Playback: random words (with parity errors) are loaded into all 256
//    addresses of all channels and played; the jet elements must follow them.
module tb_input_fpga;
  import jem_pkg::*;
  localparam int LAT = 4;   // crossings from ph_data to the demultiplexed jet element
  logic clk = 0, rst = 1, bc_ph = 0;
  logic [LVDS_W-1:0] ph_data [N_CH][N_PH];
  logic calib = 0, pb_start = 0, pb_wr_en = 0, pb_active;
  logic [N_CH-1:0] mask = '0, locked, parity_err;
  logic [2:0] pb_wr_ch = '0;
  logic [7:0] pb_wr_addr = '0;
  logic [LVDS_W-1:0] pb_wr_data = '0;
  logic [MUX_W-1:0] je_mux [N_JE];
  logic [JE_W-1:0]  rx [N_JE];
  logic [PIPE_AW-1:0] rd_idx = '0;
  logic [IN_SLICE_W-1:0] rd_slice;

  int checks = 0, failures = 0;
  int bc = 0;                       // crossing counter since reset
  int exp_je [int][N_JE];           // by input crossing
  logic [IN_SLICE_W-1:0] exp_slice [int];   // by pipeline index
  int n_perr = 0, n_mask = 0, n_pb = 0;

  always #5 clk = ~clk;
  always @(posedge clk) bc_ph <= ~bc_ph;

  input_fpga #(.LOCK_BC(4)) dut (.*);
  je_demux #(.N(N_JE)) u_rx (.clk, .rst, .bc_ph, .mux(je_mux), .je(rx));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // crossing bookkeeping and jet-element check, first half of each crossing
  always @(posedge clk) if (bc_ph && !rst) bc <= bc + 1;
  always @(negedge clk) if (!bc_ph && !rst) begin
    if (exp_je.exists(bc - LAT))
      for (int j = 0; j < N_JE; j++)
        check(int'(rx[j]) == exp_je[bc - LAT][j],
              $sformatf("je[%0d] crossing %0d got %0d exp %0d", j, bc - LAT, rx[j], exp_je[bc - LAT][j]));
  end

  function automatic logic [LVDS_W-1:0] lvds_word(int e, bit bad);
    logic [8:0] d = 9'(e);
    return {(^d) ^ bad, d};
  endfunction

  // record the model of one crossing's words
  task automatic model(int c, logic [LVDS_W-1:0] w [N_CH], logic [N_CH-1:0] m);
    int e [N_CH];
    logic [IN_SLICE_W-1:0] s;
    for (int ch = 0; ch < N_CH; ch++) begin
      bit bad = ^w[ch];
      e[ch] = (bad || m[ch]) ? 0 : int'(w[ch][8:0]);
      s[ch*10 +: 10] = {bad, 9'(e[ch])};
      if (bad) n_perr++;
      if (m[ch]) n_mask++;
    end
    for (int j = 0; j < N_JE; j++) exp_je[c][j] = e[j] + e[j + 4];
    exp_slice[(c + 2) % PIPE_DEPTH] = s;   // written at the end of crossing c+2
  endtask

  task automatic next_bc();
    @(posedge clk iff bc_ph);
    @(negedge clk);
  endtask

  logic [LVDS_W-1:0] pbw [N_CH][PB_DEPTH];

  initial begin
    for (int c = 0; c < N_CH; c++) for (int p = 0; p < N_PH; p++) ph_data[c][p] = '0;
    repeat (4) @(posedge clk iff bc_ph);
    @(negedge clk);
    rst = 0;
    // ---- 1. calibration
    calib = 1;
    for (int i = 0; i < 10; i++) begin
      for (int c = 0; c < N_CH; c++)
        for (int p = 0; p < N_PH; p++)
          ph_data[c][p] = (p == 0) ? LVDS_W'($urandom) : ((i % 2) ? SYNC_B : SYNC_A);
      next_bc();
    end
    calib = 0;
    repeat (2) next_bc();
    check(locked == '1, "all channels locked");
    // ---- 2. random data with parity errors and masks
    for (int i = 0; i < 400; i++) begin
      logic [LVDS_W-1:0] w [N_CH];
      // the mask is static configuration: the crossing before a change is
      // in flight while it changes and is not checked
      if (i == 150 || i == 300) begin
        mask = (i == 150) ? 8'b0010_0001 : 8'b1100_0000;
        exp_je.delete(bc - 1);
        exp_slice.delete((bc + 1) % PIPE_DEPTH);
      end
      for (int c = 0; c < N_CH; c++) begin
        int u = int'($urandom % 1000);
        w[c] = lvds_word((u * u / 1000) * 511 / 1000, ($urandom % 20) == 0);
        for (int p = 0; p < N_PH; p++) ph_data[c][p] = (p == 2) ? w[c] : LVDS_W'($urandom);
      end
      model(bc, w, mask);
      next_bc();
    end
    // ---- 3. readout of the last 100 crossings
    repeat (4) next_bc();
    for (int back = 4; back < 100; back++) begin
      int idx = (bc - back) % PIPE_DEPTH;
      rd_idx = PIPE_AW'(idx);
      @(negedge clk);
      if (exp_slice.exists(idx))
        check(rd_slice == exp_slice[idx], $sformatf("readout slice index %0d", idx));
    end
    // ---- 4. playback
    mask = '0;
    exp_je.delete();
    for (int c = 0; c < N_CH; c++)
      for (int a = 0; a < PB_DEPTH; a++) begin
        pbw[c][a] = lvds_word(int'($urandom % 512), ($urandom % 16) == 0);
        pb_wr_en = 1; pb_wr_ch = 3'(c); pb_wr_addr = 8'(a); pb_wr_data = pbw[c][a];
        @(negedge clk);
      end
    pb_wr_en = 0;
    next_bc();
    pb_start = 1;
    for (int k = 0; k < PB_DEPTH; k++) begin
      logic [LVDS_W-1:0] w [N_CH];
      for (int c = 0; c < N_CH; c++) w[c] = pbw[c][k];
      model(bc + k, w, '0);
    end
    @(negedge clk);
    pb_start = 0;
    @(negedge clk);
    n_pb = 0;
    while (n_pb < 300) begin
      if (pb_active) n_pb++;
      else if (n_pb > 0) break;
      next_bc();
    end
    check(n_pb == PB_DEPTH, $sformatf("playback lasted %0d crossings", n_pb));
    repeat (LAT + 2) next_bc();
    check(n_perr > 0 && n_mask > 0, "parity errors and masked channels exercised");
    $display("parity errors %0d, masked %0d, playback crossings %0d", n_perr, n_mask, n_pb);
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
