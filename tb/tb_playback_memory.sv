// tb_playback_memory: self-checking test of the playback memory.
//
// Fills all 8 x 256 words with random data, starts playback with a pulse
// that falls between crossing boundaries, and checks that the 256 words come
// out in order, one per crossing, with `active` high for exactly 256
// crossings, and that a second start replays from word 0.
module tb_playback_memory;
  import jem_pkg::*;

  logic clk = 0, rst = 1, bc_ph = 0;
  logic wr_en = 0, start = 0, active;
  logic [2:0] wr_ch;
  logic [7:0] wr_addr;
  logic [LVDS_W-1:0] wr_data;
  logic [LVDS_W-1:0] pb_data [N_CH];
  logic [LVDS_W-1:0] ref_mem [N_CH][PB_DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) bc_ph <= ~bc_ph;

  playback_memory dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic play();
    int n_active = 0;
    // start in the middle of a crossing
    @(posedge clk iff !bc_ph);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    // the start was seen at the end of the crossing: word 0 is now out
    for (int k = 0; k < PB_DEPTH + 4; k++) begin
      if (k > 0) begin
        @(posedge clk iff bc_ph);
        @(negedge clk);
      end
      if (active) n_active++;
      if (k < PB_DEPTH) begin
        check(active, $sformatf("active at word %0d", k));
        for (int c = 0; c < N_CH; c++)
          check(pb_data[c] == ref_mem[c][k], $sformatf("word %0d ch %0d", k, c));
      end else check(!active, "inactive after 256 words");
    end
    check(n_active == PB_DEPTH, $sformatf("active for %0d crossings", n_active));
  endtask

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < N_CH; c++)
      for (int a = 0; a < PB_DEPTH; a++) begin
        ref_mem[c][a] = LVDS_W'($urandom);
        wr_en = 1; wr_ch = 3'(c); wr_addr = 8'(a); wr_data = ref_mem[c][a];
        @(negedge clk);
      end
    wr_en = 0;
    repeat (5) @(negedge clk);
    check(!active, "idle before start");
    play();
    play();
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
