// goq_lut_ird: inverse quantization table (LUTird) of the gradient-oriented
// quantizer.
//
// Maps a 5-bit signed quantized residual q to the reconstructed residual
// +/- LEVELS[qc][|q|] of iic_pkg. Used by the compress core, to rebuild the
// pixel the decoder will see, and by the decompress core. A different
// quantization configuration only needs another level table, as the source
// design intends. Purely combinational. q = -16 is never produced by
// goq_lut_rd; it is read as magnitude 15.
module goq_lut_ird
  import iic_pkg::*;
(
  input  qc_t  qc,   // quantization configuration
  input  q_t   q,    // quantized residual
  output res_t rr    // reconstructed residual
);

  logic [3:0] mag;
  logic [7:0] lvl;

  always_comb begin
    if (q == q_t'(-16))  mag = 4'd15;
    else if (q[Q_W-1])   mag = 4'(-q);
    else                 mag = 4'(q);
    lvl = LEVELS[qc][mag];
    rr  = q[Q_W-1] ? -res_t'({1'b0, lvl}) : res_t'({1'b0, lvl});
  end

endmodule
