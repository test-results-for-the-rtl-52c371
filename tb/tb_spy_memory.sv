// tb_spy_memory: self-checking test of the spy memory.
//
// Feeds a new random word every crossing, starts a capture, waits until
// `full`, and reads all 256 words back, comparing with the words presented
// in the 256 crossings after the start. A second capture must overwrite the
// first, and words after `full` must not be stored.
module tb_spy_memory;
  logic clk = 0, rst = 1, bc_ph = 0, start = 0, busy, full;
  logic [63:0] din, rd_data;
  logic [7:0] rd_addr = '0;
  logic [63:0] hist [int];
  int bc = 0, start_bc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) bc_ph <= ~bc_ph;

  spy_memory #(.W(64), .DEPTH(256), .PER_BC(1'b1)) dut (.clk, .rst, .bc_ph, .we(1'b0), .start,
    .din, .busy, .full, .rd_addr, .rd_data);

  // new data each crossing, recorded by crossing number
  always @(negedge clk) if (!bc_ph) begin
    din = {$urandom, $urandom};
    hist[bc] = din;
    bc++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic capture();
    @(negedge clk iff bc_ph);   // first half of a crossing, data set for it
    start = 1;
    start_bc = bc;       // capture begins with the next crossing
    @(negedge clk);
    start = 0;
    wait (full);
    repeat (20) @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      rd_addr = 8'(a);
      @(negedge clk);
      check(rd_data == hist[start_bc + a], $sformatf("word %0d", a));
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    check(!busy && !full, "idle after reset");
    capture();
    capture();
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
