// tb_energy_sum: self-checking test of the Et/Ex/Ey summation.
//
// Random 11 x 7 jet-element arrays (values drawn with a falling
// exponential-like distribution up to 1022, plus all-zero and all-maximum
// arrays) are summed for each JEP quadrant, with and without loopback mode.
// Results two crossings later are compared with the reference model, whose
// cosine/sine coefficients are computed with $cos/$sin.
module tb_energy_sum;
  import jem_pkg::*;
  import jem_ref_pkg::*;
  logic clk = 0, rst = 1, bc_ph = 0, loopback = 0;
  logic [1:0] quadrant = '0;
  logic [JE_W-1:0] je [N_PHI][N_ETA];
  logic [ET_W-1:0] et;
  logic signed [EXY_W-1:0] ex, ey;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) bc_ph <= ~bc_ph;

  energy_sum dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int rnd_e(int mode);
    int u = int'($urandom % 1000);
    if (mode == 1) return 0;
    if (mode == 2) return 1022;
    // falling distribution: many small, some large
    return int'((u * u / 1000) * u / 1000) * 1022 / 1000;
  endfunction

  je_arr_t a;

  task automatic run(int mode, int q, bit lb);
    int e_t, e_x, e_y;
    for (int p = 0; p < N_PHI; p++)
      for (int e = 0; e < N_ETA; e++) begin
        a[p][e] = rnd_e(mode);
        je[p][e] = JE_W'(a[p][e]);
      end
    quadrant = 2'(q);
    loopback = lb;
    energy_ref(a, q, lb, e_t, e_x, e_y);
    repeat (2) @(posedge clk iff bc_ph);
    @(negedge clk);
    check(int'(et) == e_t, $sformatf("Et q=%0d lb=%0d got %0d exp %0d", q, lb, et, e_t));
    check(int'(ex) == e_x, $sformatf("Ex q=%0d lb=%0d got %0d exp %0d", q, lb, ex, e_x));
    check(int'(ey) == e_y, $sformatf("Ey q=%0d lb=%0d got %0d exp %0d", q, lb, ey, e_y));
  endtask

  initial begin
    for (int p = 0; p < N_PHI; p++) for (int e = 0; e < N_ETA; e++) je[p][e] = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int q = 0; q < 4; q++) begin
      run(1, q, 0);
      run(2, q, 0);
      run(2, q, 1);
      for (int i = 0; i < 100; i++) run(0, q, (i % 4) == 0);
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
