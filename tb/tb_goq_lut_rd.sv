// tb_goq_lut_rd: exhaustive test of the residual quantization table: every
// configuration and every residual -255..255 against the reference
// nearest-level quantizer.
module tb_goq_lut_rd;
  import iic_pkg::*;
  qc_t  qc;
  res_t r;
  q_t   q;
  int checks = 0, failures = 0;

  goq_lut_rd u_dut (.qc, .r, .q);

  initial begin
    for (int c = 0; c < 4; c++)
      for (int v = -255; v <= 255; v++) begin
        qc = 2'(c);
        r  = res_t'(v);
        #1;
        checks++;
        if (int'(q) != tb_iic_ref::quant(c, v)) begin
          failures++;
          if (failures < 10) $display("FAIL qc %0d r %0d: q %0d expected %0d", c, v, q, tb_iic_ref::quant(c, v));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
