// je_mux: sends N 10-bit jet elements as 5-bit words at 80 MHz.
//
// The jet elements present during a bunch crossing are captured at its end
// (bc_ph = 1); in the next crossing the low five bits leave in the first
// 12.5 ns half (bc_ph = 0 cycle) and the high five bits in the second half.
// The output is registered, so each half-word is stable for one 80 MHz clock.
// Receiving end: je_demux. The 5-bit width at 80 MHz follows the module
// description; sending the low half first is this design's choice.
module je_mux
  import jem_pkg::*;
#(
  parameter int N = N_JE
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             bc_ph,
  input  logic [JE_W-1:0]  je  [N],
  output logic [MUX_W-1:0] mux [N]
);

  logic [JE_W-1:0] held [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) begin
        held[i] <= '0;
        mux[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        if (bc_ph) begin
          held[i] <= je[i];
          mux[i]  <= je[i][MUX_W-1:0];      // low half, visible while bc_ph = 0
        end else begin
          mux[i]  <= held[i][JE_W-1:MUX_W]; // high half, visible while bc_ph = 1
        end
      end
    end
  end

endmodule
