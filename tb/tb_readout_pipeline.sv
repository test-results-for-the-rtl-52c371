// tb_readout_pipeline: self-checking test of the readout pipeline.
//
// Writes a distinct word every crossing into two pipelines, one with
// LAT_OFFSET = 0 and one with LAT_OFFSET = 3, and reads back random
// indices up to the full depth behind the write index, checking the
// returned words (one clock after the index) against the recorded history.
module tb_readout_pipeline;
  import jem_pkg::*;
  logic clk = 0, rst = 1, bc_ph = 0;
  logic [79:0] din, dout0, dout3;
  logic [PIPE_AW-1:0] rd_idx = '0, wr0, wr3;
  logic [79:0] hist [PIPE_DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) bc_ph <= ~bc_ph;

  readout_pipeline #(.W(80), .DEPTH(PIPE_DEPTH), .LAT_OFFSET(0)) dut (.clk, .rst, .bc_ph, .din,
    .rd_idx, .dout(dout0), .wr_idx(wr0));
  readout_pipeline #(.W(80), .DEPTH(PIPE_DEPTH), .LAT_OFFSET(3)) u3 (.clk, .rst, .bc_ph, .din,
    .rd_idx, .dout(dout3), .wr_idx(wr3));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    din = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < 600; k++) begin
      // new word for this crossing, written at its end at index wr0
      din = {16'(k), $urandom, $urandom};
      hist[wr0] = din;
      check(wr0 == wr3, "write indices agree");
      @(posedge clk iff bc_ph);
      @(negedge clk);
      if (k > PIPE_DEPTH) begin
        int back = 1 + ($urandom % (PIPE_DEPTH - 4));
        rd_idx = PIPE_AW'(wr0 - back);
        @(negedge clk);
        check(dout0 == hist[rd_idx], $sformatf("offset 0 back %0d", back));
        check(dout3 == hist[PIPE_AW'(rd_idx + 3)], $sformatf("offset 3 back %0d", back));
      end
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
