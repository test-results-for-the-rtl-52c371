// energy_sum: transverse-energy summation of the MainProcessor.
//
// The 32 core jet elements (rows 1..8, columns 1..4 of the 11 x 7 array) are
// summed to Et, and to the components Ex and Ey that the Common Merger
// Modules combine into missing energy. Stage 1 forms the eight phi-row sums.
// Stage 2 adds them to Et, and multiplies each by the cosine and sine of the
// row's azimuth, rounded to COEF_FRAC fraction bits, before adding them to
// Ex and Ey (arithmetic shift after the sum). The row azimuth is the centre
// of the row, (row + 0.5) x 360/32 degrees, rotated by 90 degrees per JEP
// quadrant. In loopback mode stage 1 uses the duplicated eta columns
// 0, 5 and 6 of the same rows instead of the core.
//
// Timing: two register stages at one step per bunch crossing; et/ex/ey
// belong to the jet elements of two crossings earlier. Summing the 32 core
// elements to Et, Ex, Ey at 40 MHz and the loopback variant follow the module
// description; the coefficient precision and the azimuth convention are this
// design's choices.
module energy_sum
  import jem_pkg::*;
#(
  parameter int COEF_FRAC = 10
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    bc_ph,
  input  logic [JE_W-1:0]         je [N_PHI][N_ETA],
  input  logic [1:0]              quadrant,
  input  logic                    loopback,
  output logic [ET_W-1:0]         et,
  output logic signed [EXY_W-1:0] ex,
  output logic signed [EXY_W-1:0] ey
);

  localparam int RW = JE_W + 2;   // row sum of four elements
  localparam int PW = RW + COEF_FRAC + 4;

  // cos/sin of the centre of local row r, scaled by 2^10
  localparam int COS_T [N_PHI_CORE] = '{1019, 980, 903, 792, 650, 483, 297, 100};
  localparam int SIN_T [N_PHI_CORE] = '{100, 297, 483, 650, 792, 903, 980, 1019};

  logic [RW-1:0] row [N_PHI_CORE];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < N_PHI_CORE; r++) row[r] <= '0;
    end else if (bc_ph) begin
      for (int r = 0; r < N_PHI_CORE; r++) begin
        if (loopback)
          row[r] <= RW'(je[r + PHI0][0]) + RW'(je[r + PHI0][5]) + RW'(je[r + PHI0][6]);
        else
          row[r] <= RW'(je[r + PHI0][ETA0])     + RW'(je[r + PHI0][ETA0 + 1])
                  + RW'(je[r + PHI0][ETA0 + 2]) + RW'(je[r + PHI0][ETA0 + 3]);
      end
    end
  end

  logic [ET_W-1:0]      et_c;
  logic signed [PW-1:0] ex_c, ey_c;

  always_comb begin
    et_c = '0;
    ex_c = '0;
    ey_c = '0;
    for (int r = 0; r < N_PHI_CORE; r++) begin
      logic signed [PW-1:0] c, s, cx, cy, v;
      c = PW'(COS_T[r] * (1 << COEF_FRAC) / 1024);
      s = PW'(SIN_T[r] * (1 << COEF_FRAC) / 1024);
      case (quadrant)
        2'd0: begin cx =  c; cy =  s; end
        2'd1: begin cx = -s; cy =  c; end
        2'd2: begin cx = -c; cy = -s; end
        default: begin cx = s; cy = -c; end
      endcase
      v    = PW'(row[r]);
      et_c = et_c + ET_W'(row[r]);
      ex_c = ex_c + v * cx;
      ey_c = ey_c + v * cy;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      et <= '0;
      ex <= '0;
      ey <= '0;
    end else if (bc_ph) begin
      et <= et_c;
      ex <= EXY_W'(ex_c >>> COEF_FRAC);
      ey <= EXY_W'(ey_c >>> COEF_FRAC);
    end
  end

endmodule
