// je_demux: rebuilds 10-bit jet elements from 5-bit words at 80 MHz.
//
// Receiving end of je_mux. The low half is on the wire while bc_ph = 0 and
// the high half while bc_ph = 1; the low half is held for one clock and the
// full word is registered at the end of the crossing (bc_ph = 1 edge), so
// `je` changes once per bunch crossing.
module je_demux
  import jem_pkg::*;
#(
  parameter int N = N_JE
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             bc_ph,
  input  logic [MUX_W-1:0] mux [N],
  output logic [JE_W-1:0]  je  [N]
);

  logic [MUX_W-1:0] lo [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) begin
        lo[i] <= '0;
        je[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (!bc_ph) lo[i] <= mux[i];
        else        je[i] <= {mux[i], lo[i]};
      end
    end
  end

endmodule
