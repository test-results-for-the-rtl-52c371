// quadlinear_encoder: compresses the JEM energy sums to a 25-bit word.
//
// Each of Et (unsigned), Ex and Ey (two's complement) becomes an 8-bit field
// {range[1:0], mantissa[5:0]} with value = mantissa x 4^range: the smallest
// range that holds the value is used and the mantissa is the value shifted
// right by 2 x range bits (truncated towards minus infinity). Et mantissas
// are unsigned (0..63), Ex/Ey mantissas signed (-32..31). A value beyond
// range 3 saturates to the largest (or most negative) code. The word is
// {parity, Et, Ey, Ex}, the parity bit making the number of ones odd.
//
// Timing: one register, updated once per bunch crossing. The quad-linear
// scheme, the 25-bit width and odd parity follow the module description;
// the field layout, the x4 range steps and the rounding are this design's
// choices.
module quadlinear_encoder
  import jem_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    bc_ph,
  input  logic [ET_W-1:0]         et,
  input  logic signed [EXY_W-1:0] ex,
  input  logic signed [EXY_W-1:0] ey,
  output logic [EWORD_W-1:0]      word
);

  function automatic logic [7:0] enc_u(input logic [ET_W-1:0] v);
    for (int r = 0; r < 4; r++)
      if ((v >> (2 * r)) < 64) return {2'(r), 6'(v >> (2 * r))};
    return 8'hFF;
  endfunction

  function automatic logic [7:0] enc_s(input logic signed [EXY_W-1:0] v);
    for (int r = 0; r < 4; r++) begin
      logic signed [EXY_W-1:0] m;
      m = v >>> (2 * r);
      if (m >= -32 && m <= 31) return {2'(r), 6'(m)};
    end
    return (v < 0) ? {2'd3, 6'b100000} : {2'd3, 6'b011111};
  endfunction

  logic [23:0] f;
  assign f = {enc_u(et), enc_s(ey), enc_s(ex)};

  always_ff @(posedge clk) begin
    if (rst) word <= EWORD_W'(1) << 24;   // zero fields, odd parity
    else if (bc_ph) word <= {~^f, f};
  end

endmodule
