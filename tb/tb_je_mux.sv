// tb_je_mux: self-checking test of the 5-bit 80 MHz jet-element link.
//
// Random 10-bit jet elements go through je_mux and je_demux. The test
// checks the two half-words on the wire (low half in the first 80 MHz cycle
// of the next crossing, high half in the second) and that the receiver
// returns each element two crossings after it was presented.
module tb_je_mux;
  import jem_pkg::*;

  logic clk = 0, rst = 1, bc_ph = 0;
  logic [JE_W-1:0]  je  [N_JE];
  logic [MUX_W-1:0] mux [N_JE];
  logic [JE_W-1:0]  rx  [N_JE];
  logic [JE_W-1:0]  hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) bc_ph <= ~bc_ph;

  je_mux   #(.N(N_JE)) dut (.clk, .rst, .bc_ph, .je, .mux);
  je_demux #(.N(N_JE)) u_rx (.clk, .rst, .bc_ph, .mux, .je(rx));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [JE_W-1:0] sent [200][N_JE];

  initial begin
    for (int i = 0; i < N_JE; i++) je[i] = '0;
    repeat (4) @(posedge clk);
    @(posedge clk iff bc_ph);
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < 200; k++) begin
      for (int i = 0; i < N_JE; i++) begin
        sent[k][i] = JE_W'($urandom);
        je[i] = sent[k][i];
      end
      @(posedge clk iff bc_ph);   // end of crossing k: captured
      @(negedge clk);             // first half of k+1: low half on the wire
      if (k >= 1)
        for (int i = 0; i < N_JE; i++)
          check(rx[i] == sent[k-1][i], $sformatf("rx k=%0d i=%0d", k, i));
      for (int i = 0; i < N_JE; i++)
        check(mux[i] == sent[k][i][4:0], $sformatf("low half k=%0d", k));
      @(negedge clk);             // second half: high half
      for (int i = 0; i < N_JE; i++)
        check(mux[i] == sent[k][i][9:5], $sformatf("high half k=%0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
