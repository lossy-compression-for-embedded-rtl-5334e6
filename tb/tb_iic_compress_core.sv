// tb_iic_compress_core: random sub-blocks (smooth, noisy and edge pixels,
// top-of-block or not, every configuration) pushed back to back and with
// gaps; each output code, length and reconstruction is compared with the
// reference encoder, and every output must come exactly two cycles after
// its input (one sub-block per cycle).
module tb_iic_compress_core;
  import iic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qc_t     qc;
  logic    in_valid, in_first;
  subblk_t in_pix;
  pix_t    in_up;
  logic    out_valid, out_first;
  code_t   out_code;
  len_t    out_len;
  subblk_t out_rec;

  iic_compress_core u_dut (.*);

  typedef struct { logic [63:0] code; int len; int d[4]; bit first; longint t; } exp_t;
  exp_t eq [$];
  int checks = 0, failures = 0, n_out = 0, n_first = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    bit ok;
    checks++;
    n_out++;
    if (eq.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      e = eq.pop_front();
      ok = (out_code == code_t'(e.code)) && (int'(out_len) == e.len) && (out_first == e.first)
           && (cycle - e.t == 2);
      for (int i = 0; i < 4; i++) if (int'(out_rec[i]) != e.d[i]) ok = 0;
      if (!ok) begin
        failures++;
        if (failures < 10)
          $display("FAIL: code %h len %0d (exp %h %0d) latency %0d", out_code, out_len,
                   e.code[25:0], e.len, cycle - e.t);
      end
    end
  end

  initial begin
    int p[4], up, len, d[4], mode;
    logic [63:0] code;
    bit first;
    in_valid = 0; in_first = 0; in_pix = '0; in_up = '0; qc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (n % 1000 == 0) qc = 2'(n / 1000);
      if ($urandom % 5 == 0) begin in_valid = 0; continue; end
      mode  = $urandom % 3;
      first = ($urandom % 4) == 0;
      up    = $urandom % 256;
      for (int i = 0; i < 4; i++)
        case (mode)
          0: p[i] = tb_iic_ref::clamp(up + int'($urandom % 7) - 3);
          1: p[i] = $urandom % 256;
          default: p[i] = (i < 2) ? 10 : 245;
        endcase
      tb_iic_ref::encode(int'(qc), first, p, up, code, len, d);
      eq.push_back('{code, len, d, first, cycle});
      in_valid = 1;
      in_first = first;
      in_up    = 8'(up);
      for (int i = 0; i < 4; i++) in_pix[i] = 8'(p[i]);
      if (first) n_first++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (eq.size() != 0 || n_first == 0) begin failures++; $display("FAIL: %0d outputs missing", eq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
