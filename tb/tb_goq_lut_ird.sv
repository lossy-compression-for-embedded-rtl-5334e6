// tb_goq_lut_ird: exhaustive test of the inverse quantization table: every
// configuration and every quantized residual -15..15 against the reference
// level table.
module tb_goq_lut_ird;
  import iic_pkg::*;
  qc_t  qc;
  q_t   q;
  res_t rr;
  int checks = 0, failures = 0;

  goq_lut_ird u_dut (.qc, .q, .rr);

  initial begin
    for (int c = 0; c < 4; c++)
      for (int v = -15; v <= 15; v++) begin
        qc = 2'(c);
        q  = q_t'(v);
        #1;
        checks++;
        if (int'(rr) != tb_iic_ref::recon(c, v)) begin
          failures++;
          if (failures < 10) $display("FAIL qc %0d q %0d: %0d expected %0d", c, v, rr, tb_iic_ref::recon(c, v));
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
