// tb_quadlinear_encoder: self-checking test of the quad-linear energy code.
//
// Drives boundary values of every range (63/64, 255/256, 1023/1024,
// 4095/4096 and the signed equivalents), saturating values and random
// values, and compares the 25-bit word with the reference encoder; it also
// checks odd parity and that every range code occurs.
module tb_quadlinear_encoder;
  import jem_pkg::*;
  import jem_ref_pkg::*;
  logic clk = 0, rst = 1, bc_ph = 0;
  logic [ET_W-1:0] et;
  logic signed [EXY_W-1:0] ex, ey;
  logic [EWORD_W-1:0] word;
  int checks = 0, failures = 0;
  int range_seen [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;
  always @(posedge clk) bc_ph <= ~bc_ph;

  quadlinear_encoder dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(int vt, int vx, int vy);
    logic [24:0] exp_w;
    et = ET_W'(vt); ex = EXY_W'(vx); ey = EXY_W'(vy);
    @(posedge clk iff bc_ph);
    @(negedge clk);
    exp_w = qword(vt, vx, vy);
    check(word == exp_w, $sformatf("et=%0d ex=%0d ey=%0d got %h exp %h", vt, vx, vy, word, exp_w));
    check($countones(word) % 2 == 1, "odd parity");
    range_seen[word[23:22]]++;
  endtask

  int vals [] = '{0, 1, 63, 64, 255, 256, 1023, 1024, 4031, 4095, 4096, 20000, 32767};
  int svals [] = '{0, 31, 32, -32, -33, 127, 128, -128, -129, 511, 512, -512, -513,
                   2047, 2048, -2048, -2049, 32767, -32768};

  initial begin
    et = '0; ex = '0; ey = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 0;
    foreach (vals[i]) apply(vals[i], 0, 0);
    foreach (svals[i]) apply(0, svals[i], -svals[i] < 32767 ? -svals[i] : 32767);
    for (int i = 0; i < 2000; i++)
      apply(int'($urandom % 32768), int'($urandom % 65536) - 32768, int'($urandom % 8192) - 4096);
    for (int r = 0; r < 4; r++) check(range_seen[r] > 0, $sformatf("Et range %0d used", r));
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
