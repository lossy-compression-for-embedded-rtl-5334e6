// goq_lut_rd: residual quantization table (LUTrd) of the gradient-oriented
// quantizer.
//
// Maps a DPCM residual r (-255..255) to a 5-bit signed quantized residual q
// under quantization configuration qc. The quantizer is not power-of-two
// based, so it cannot be done by shifting; as in the source design it is a
// table look-up. The table holds, for every magnitude 0..255 and every
// configuration, the index of the nearest reconstruction level of
// iic_pkg::LEVELS; it is filled at elaboration by iic_pkg::nearest_level, so
// replacing the level table changes the quantizer. The sign of r is applied
// after the look-up. Purely combinational.
module goq_lut_rd
  import iic_pkg::*;
(
  input  qc_t  qc,   // quantization configuration
  input  res_t r,    // residual
  output q_t   q     // quantized residual, -15..15
);

  // Entry (qc, |r|) sits at bits [4*(256*qc + |r|) +: 4].
  typedef logic [N_QC*256*4-1:0] rom_t;

  function automatic rom_t build_rom();
    rom_t t;
    t = '0;
    for (int unsigned c = 0; c < N_QC; c++)
      for (int unsigned a = 0; a < 256; a++)
        t[4*(256*c + a) +: 4] = nearest_level(qc_t'(c), a);
    return t;
  endfunction

  localparam rom_t ROM = build_rom();

  logic [7:0] mag;
  logic [3:0] idx;

  always_comb begin
    mag = r[PIX_W] ? 8'(-r) : r[PIX_W-1:0];
    idx = ROM[4*{qc, mag} +: 4];
    q   = r[PIX_W] ? -q_t'({1'b0, idx}) : q_t'({1'b0, idx});
  end

endmodule
