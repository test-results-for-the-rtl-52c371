// tb_control_fpga: self-checking test of the Control-FPGA.
//
// Checks VME writes and read-back of every configuration register, the
// decoded playback-memory write strobes, reads of both spy memories (through
// behavioural memories that answer one clock after the address) and of the
// status word, the playback/spy start pulse from the VME control bit and
// from the TTC broadcast command (and none from other commands), and the
// bunch-crossing number: cleared by BCR, counting, wrapping after 3564.
module tb_control_fpga;
  import jem_pkg::*;
  logic clk = 0, rst = 1, bc_ph = 0;
  logic [15:0] vme_addr = '0, vme_wdata = '0, vme_rdata;
  logic vme_we = 0, vme_re = 0, vme_rvalid;
  logic ttc_bcr = 0, ttc_brc_str = 0;
  logic [5:0] ttc_brc = '0;
  jem_cfg_t cfg;
  logic [BCN_W-1:0] bcn;
  logic pbspy_start;
  logic pb_wr_en [N_INFPGA];
  logic [2:0] pb_wr_ch;
  logic [7:0] pb_wr_addr, spy_rd_addr;
  logic [LVDS_W-1:0] pb_wr_data;
  logic [63:0] main_spy_data;
  logic [17:0] roc_spy_data;
  logic all_locked = 1, pb_active = 0, parity_err = 0, spy_busy = 0;
  logic [7:0] roc_dropped = 8'h5A;
  int checks = 0, failures = 0, n_start = 0;

  always #5 clk = ~clk;
  always @(posedge clk) bc_ph <= ~bc_ph;
  always @(posedge clk) begin
    main_spy_data <= {spy_rd_addr, 8'h11, spy_rd_addr, 8'h22, spy_rd_addr, 8'h33, spy_rd_addr, 8'h44};
    roc_spy_data  <= {2'b10, spy_rd_addr, ~spy_rd_addr};
    if (pbspy_start) n_start++;
  end

  control_fpga dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic vwrite(logic [15:0] a, logic [15:0] d);
    vme_addr = a; vme_wdata = d; vme_we = 1;
    @(negedge clk);
    vme_we = 0;
  endtask

  task automatic vread(logic [15:0] a, output logic [15:0] d);
    vme_addr = a; vme_re = 1;
    @(negedge clk);
    vme_re = 0;
    @(negedge clk);
    check(vme_rvalid, "read valid after two clocks");
    d = vme_rdata;
  endtask

  logic [15:0] d;
  logic [13:0] thr_v [8];

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // registers
    vwrite(A_LATENCY, 16'd57);  vread(A_LATENCY, d);  check(d == 57 && cfg.l1a_latency == 57, "latency");
    vwrite(A_NSLICES, 16'd5);   vread(A_NSLICES, d);  check(d == 5 && cfg.n_slices == 5, "slices");
    vwrite(A_QUADRANT, 16'd2);  vread(A_QUADRANT, d); check(d == 2 && cfg.quadrant == 2, "quadrant");
    vwrite(A_WIN, 16'h9E4B);    vread(A_WIN, d);      check(d == 16'h9E4B && cfg.win == 16'h9E4B, "windows");
    vwrite(A_CTRL, 16'h0003);   vread(A_CTRL, d);     check(d == 3 && cfg.calib && cfg.loopback, "control");
    for (int t = 0; t < 8; t++) begin
      thr_v[t] = 14'($urandom);
      vwrite(A_THR0 + 16'(t), 16'(thr_v[t]));
    end
    for (int t = 0; t < 8; t++) begin
      vread(A_THR0 + 16'(t), d);
      check(d == 16'(thr_v[t]) && cfg.thr[t] == thr_v[t], $sformatf("threshold %0d", t));
    end
    for (int f = 0; f < N_INFPGA; f++) vwrite(A_MASK0 + 16'(f), 16'(f * 17));
    for (int f = 0; f < N_INFPGA; f++) begin
      vread(A_MASK0 + 16'(f), d);
      check(d == 16'((f * 17) % 256) && cfg.mask[f] == 8'(f * 17), $sformatf("mask %0d: read %h reg %h", f, d, cfg.mask[f]));
    end
    vread(A_STATUS, d);
    check(d == {8'h5A, 6'd0, 1'b0, 1'b1}, "status");
    // sticky parity-error flag and spy-busy bit
    @(negedge clk iff bc_ph);
    parity_err = 1;
    spy_busy = 1;
    @(negedge clk);
    @(negedge clk);
    parity_err = 0;
    vread(A_STATUS, d);
    check(d == {8'h5A, 4'd0, 1'b1, 1'b1, 1'b0, 1'b1}, $sformatf("status with parity error: %h", d));
    spy_busy = 0;
    vwrite(A_CTRL, 16'h0008);
    vread(A_STATUS, d);
    check(d == {8'h5A, 6'd0, 1'b0, 1'b1}, $sformatf("parity flag cleared: %h", d));
    // playback writes
    for (int i = 0; i < 40; i++) begin
      int f = int'($urandom % N_INFPGA);
      logic [2:0] ch = 3'($urandom);
      logic [7:0] a = 8'($urandom);
      logic [9:0] w = 10'($urandom);
      vme_addr = {1'b1, 4'(f), ch, a}; vme_wdata = 16'(w); vme_we = 1;
      #1;
      for (int g = 0; g < N_INFPGA; g++) check(pb_wr_en[g] == (g == f), "playback strobe decode");
      check(pb_wr_ch == ch && pb_wr_addr == a && pb_wr_data == w, "playback address/data");
      @(negedge clk);
      vme_we = 0;
    end
    // spy reads
    for (int i = 0; i < 20; i++) begin
      logic [7:0] a = 8'($urandom);
      logic [1:0] part = 2'(i);
      vread({4'h4, 2'b00, part, a}, d);
      check(d == {a, 8'h44 - 8'(part) * 8'h11}, $sformatf("main spy part %0d", part));
      vread({4'h5, 3'b000, 1'b0, a}, d);
      check(d == {a, ~a}, "ROC spy data");
      vread({4'h5, 3'b000, 1'b1, a}, d);
      check(d == 16'd2, "ROC spy flags");
    end
    // playback/spy start
    n_start = 0;
    vwrite(A_CTRL, 16'h0004);
    repeat (3) @(negedge clk);
    check(n_start == 1, "VME start pulse");
    ttc_brc = BRC_PBSPY; ttc_brc_str = 1; @(negedge clk); ttc_brc_str = 0;
    repeat (3) @(negedge clk);
    check(n_start == 2, "TTC broadcast start pulse");
    ttc_brc = 6'd9; ttc_brc_str = 1; @(negedge clk); ttc_brc_str = 0;
    repeat (3) @(negedge clk);
    check(n_start == 2, "other broadcast ignored");
    // bunch-crossing number
    @(negedge clk iff !bc_ph);   // second half of a crossing
    ttc_bcr = 1;
    @(posedge clk iff bc_ph);
    @(negedge clk);
    ttc_bcr = 0;
    check(bcn == 0, "BCR clears the crossing number");
    for (int k = 1; k <= ORBIT_BC + 3; k++) begin
      @(posedge clk iff bc_ph);
      @(negedge clk);
      if (k % 97 == 0 || k >= ORBIT_BC - 2)
        check(int'(bcn) == k % ORBIT_BC, $sformatf("bcn %0d at crossing %0d", bcn, k));
    end
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
