// tb_readout_controller: self-checking test of the Readout Controller.
//
// A behavioural pipeline model returns, one clock after each read index, a
// slice whose 16-bit words encode the index and the word number, and a
// random RoI record per index. The test sends Level-1 accepts with 1, 3 and
// 5 slices and two latencies, spaced and back to back, and a burst that
// overfills the event FIFO. Every DAQ packet must carry the right BCN, slice
// count and slices centred on the accepted crossing; every Level-2 packet
// the RoI words of the accepted crossing; packets lost in the burst must
// equal the drop counter. A spy capture of the DAQ stream is read back.
module tb_readout_controller;
  import jem_pkg::*;
  logic clk = 0, rst = 1, bc_ph = 0, l1a = 0, spy_start = 0;
  logic [BCN_W-1:0] bcn;
  logic [PIPE_AW-1:0] l1a_latency, rd_idx;
  logic [2:0] n_slices;
  logic [SLICE_W-1:0] slice_in;
  logic [ROI_W-1:0] roi_in;
  logic [15:0] daq_data, roi_data;
  logic daq_valid, daq_first, daq_last, roi_valid, roi_first, roi_last;
  logic [7:0] spy_rd_addr = '0, dropped;
  logic [17:0] spy_rd_data;

  int checks = 0, failures = 0, bc = 0;
  logic [ROI_W-1:0] roi_tab [PIPE_DEPTH];
  typedef struct { int bcn; int idx; int n; } ev_t;
  ev_t sent [$];
  logic [15:0] daq_pkt [$], roi_pkt [$];
  logic [17:0] daq_log [$];
  int n_daq = 0, n_roi = 0, n_skipped = 0, n_multi = 0;

  always #5 clk = ~clk;
  always @(posedge clk) bc_ph <= ~bc_ph;
  always @(posedge clk) if (bc_ph && !rst) bc <= bc + 1;
  assign bcn = BCN_W'(bc * 7);

  readout_controller dut (.*);

  // pipeline model
  always @(posedge clk) begin
    for (int w = 0; w < SLICE_W / 16; w++) slice_in[w*16 +: 16] <= {rd_idx, 3'd0, 6'(w)};
    roi_in <= roi_tab[rd_idx];
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic ev_t next_event(int bcn_seen);
    ev_t e;
    while (sent.size() > 0) begin
      e = sent.pop_front();
      if (e.bcn == bcn_seen) return e;
      n_skipped++;
    end
    e.bcn = -1;
    return e;
  endfunction

  ev_t roi_q [$];

  always @(posedge clk) if (!rst) begin
    if (daq_valid) begin
      daq_log.push_back({daq_first, daq_last, daq_data});
      daq_pkt.push_back(daq_data);
      if (daq_last) begin
        ev_t e;
        e = next_event(int'(daq_pkt[0][11:0]));
        check(e.bcn >= 0 && daq_pkt[0][15:12] == 4'hA, $sformatf("DAQ header %h matches an accept (pkt %0d)", daq_pkt[0], n_daq));
        check(int'(daq_pkt[1]) == e.n, "DAQ slice count");
        check(daq_pkt.size() == 2 + e.n * (SLICE_W / 16), "DAQ packet length");
        for (int s = 0; s < e.n; s++) begin
          int idx;
          idx = (e.idx - (e.n - 1) / 2 + s) & (PIPE_DEPTH - 1);
          for (int w = 0; w < SLICE_W / 16; w++)
            check(daq_pkt[2 + s * (SLICE_W / 16) + w] == {7'(idx), 3'd0, 6'(w)},
                  $sformatf("DAQ slice %0d word %0d got %h idx %0d", s, w, daq_pkt[2 + s * (SLICE_W / 16) + w], idx));
        end
        if (e.n > 1) n_multi++;
        n_daq++;
        daq_pkt.delete();
      end
    end
  end

  // Level-2 stream, matched against its own copy of the accepts
  always @(posedge clk) if (!rst) begin
    if (roi_valid) begin
      roi_pkt.push_back(roi_data);
      if (roi_last) begin
        int k, cnt;
        ev_t e;
        k = 1;
        cnt = 0;
        e.bcn = -1;
        while (roi_q.size() > 0 && e.bcn != int'(roi_pkt[0][11:0])) e = roi_q.pop_front();
        check(roi_pkt[0] == {4'hB, 12'(e.bcn)}, "RoI header");
        for (int r = 0; r < N_ROI; r++)
          if (roi_tab[e.idx][r*9 +: 8] != 0) begin
            check(roi_pkt[k] == {3'd0, 5'(r), roi_tab[e.idx][r*9 +: 8]}, $sformatf("RoI word %0d", r));
            k++;
            cnt++;
          end
        check(roi_pkt.size() == k + 1 && roi_pkt[k] == {4'hE, 6'd0, 6'(cnt)}, "RoI trailer");
        n_roi++;
        roi_pkt.delete();
      end
    end
  end

  task automatic accept();
    sent.push_back('{bcn: int'(bcn), idx: (bc - int'(l1a_latency)) & (PIPE_DEPTH - 1), n: int'(n_slices)});
    roi_q.push_back(sent[$]);
    l1a = 1;
    @(posedge clk iff bc_ph);
    @(negedge clk);
    l1a = 0;
  endtask

  task automatic wait_bc(int n);
    repeat (n) @(posedge clk iff bc_ph);
    @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < PIPE_DEPTH; i++)
      for (int r = 0; r < N_ROI; r++)
        roi_tab[i][r*9 +: 9] = ($urandom % 4 == 0) ? 9'($urandom) | 9'h100 : 9'd0;
    l1a_latency = PIPE_AW'(40);
    n_slices = 3'd1;
    repeat (4) @(posedge clk iff bc_ph);
    @(negedge clk);
    rst = 0;
    spy_start = 1;
    @(negedge clk);
    spy_start = 0;
    wait_bc(200);
    for (int n = 1; n <= 5; n += 2) begin
      n_slices = 3'(n);
      accept();
      wait_bc(400);
      accept();
      accept();         // back to back
      wait_bc(700);
    end
    l1a_latency = PIPE_AW'(77);
    accept();
    wait_bc(300);
    // burst: twelve accepts in twelve crossings with five slices
    for (int i = 0; i < 12; i++) accept();
    wait_bc(6000);
    check(n_daq + int'(dropped) == 22, $sformatf("packets %0d + dropped %0d", n_daq, dropped));
    check(n_skipped + sent.size() == int'(dropped), "lost packets equal drop count");
    check(dropped > 0, "event FIFO overflow exercised");
    check(n_roi == n_daq, "one RoI packet per DAQ packet");
    check(n_multi > 0, "multi-slice readout exercised");
    // ROC spy: first 256 DAQ words
    for (int a = 0; a < 256; a++) begin
      spy_rd_addr = 8'(a);
      @(negedge clk);
      check(spy_rd_data == daq_log[a], $sformatf("spy word %0d", a));
    end
    $display("DAQ packets %0d, RoI packets %0d, dropped %0d", n_daq, n_roi, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
