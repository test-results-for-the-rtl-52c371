// tb_lvds_sync: self-checking test of the LVDS synchronisation stage.
//
// Each scenario sends the switching pattern on a chosen set of clean DLL
// phases while the others carry noise, ends calibration and checks the
// selected phase and lock flag against the rule "a clean phase with two
// clean neighbours, else the first clean phase". It then drives different
// words on the four phases and checks that the selected one comes out one
// crossing later.
module tb_lvds_sync;
  import jem_pkg::*;

  localparam int LOCK = 8;
  logic clk = 0, rst = 1, bc_ph = 0, calib = 0;
  logic [LVDS_W-1:0] ph_data [N_PH];
  logic [LVDS_W-1:0] data;
  logic [1:0] phase;
  logic locked;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) bc_ph <= ~bc_ph;

  lvds_sync #(.LOCK_BC(LOCK)) dut (.*);

  task automatic next_bc();
    @(posedge clk iff bc_ph);
    @(negedge clk);
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic scenario(logic [3:0] clean);
    int exp_ph;
    bit exp_lock;
    calib = 1;
    for (int i = 0; i < LOCK + 6; i++) begin
      for (int p = 0; p < N_PH; p++)
        // the source stops switching two crossings before calibration ends
        ph_data[p] = clean[p] ? ((i % 2 || i >= LOCK + 4) ? SYNC_B : SYNC_A) : LVDS_W'($urandom);
      next_bc();
    end
    calib = 0;
    next_bc();
    next_bc();
    exp_lock = (clean != 0);
    exp_ph = 0;
    for (int p = 3; p >= 0; p--) if (clean[p]) exp_ph = p;
    for (int p = 3; p >= 0; p--)
      if (clean[p] && clean[(p + 1) % 4] && clean[(p + 3) % 4]) exp_ph = p;
    check(locked == exp_lock, $sformatf("locked clean=%b got %0d", clean, locked));
    if (exp_lock) check(phase == 2'(exp_ph), $sformatf("phase clean=%b got %0d exp %0d", clean, phase, exp_ph));
    // data path
    for (int i = 0; i < 6; i++) begin
      logic [LVDS_W-1:0] w [N_PH];
      for (int p = 0; p < N_PH; p++) begin
        w[p] = LVDS_W'($urandom);
        ph_data[p] = w[p];
      end
      next_bc();
      if (exp_lock) check(data == w[exp_ph], $sformatf("data clean=%b", clean));
    end
  endtask

  initial begin
    for (int p = 0; p < N_PH; p++) ph_data[p] = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 0;
    scenario(4'b0110);   // phases 1,2 -> first clean = 1
    scenario(4'b0111);   // 0,1,2 -> 1 has both neighbours
    scenario(4'b1110);   // 1,2,3 -> 2
    scenario(4'b1101);   // 0,2,3 -> 3 (neighbours 2 and 0)
    scenario(4'b1000);   // only 3
    scenario(4'b0000);   // nothing locks
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
