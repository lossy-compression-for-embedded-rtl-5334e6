// tb_iic_decompress_core: columns of eight coded sub-blocks (the top one of
// each column starts a compression block), made by the reference encoder
// from random smooth, noisy and edge pixels under every configuration, are
// fed two per cycle, mostly back to back. The combinational code lengths,
// the decoded pixels and a latency of exactly two cycles are checked.
module tb_iic_decompress_core;
  import iic_pkg::*;
  localparam int LANES = 2, K = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qc_t     qc;
  logic    in_valid;
  code_t   in_win   [LANES];
  logic    in_first [LANES];
  len_t    in_len   [LANES];
  logic    out_valid;
  subblk_t out_pix  [LANES];

  iic_decompress_core #(.LANES(LANES)) u_dut (.*);

  typedef struct { int d [LANES][4]; longint t; } exp_t;
  exp_t eq [$];
  int checks = 0, failures = 0, n_pairs = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    bit ok;
    checks++;
    if (eq.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      e = eq.pop_front();
      ok = (cycle - e.t == 2);
      for (int l = 0; l < LANES; l++)
        for (int i = 0; i < 4; i++) if (int'(out_pix[l][i]) != e.d[l][i]) ok = 0;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL: pair at cycle %0d wrong (latency %0d)", cycle, cycle - e.t);
      end
    end
  end

  initial begin
    int p[4], d[4], up, len[K], mode;
    logic [63:0] code [K];
    int dd [K][4];
    in_valid = 0; qc = '0;
    for (int l = 0; l < LANES; l++) begin in_win[l] = '0; in_first[l] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int col = 0; col < 600; col++) begin
      if (col % 150 == 0) begin
        // qc is held while sub-blocks are in flight: drain before changing it
        @(negedge clk);
        in_valid = 0;
        repeat (3) @(negedge clk);
        qc = 2'(col / 150);
      end
      up = 0;
      for (int y = 0; y < K; y++) begin
        mode = $urandom % 3;
        for (int i = 0; i < 4; i++)
          case (mode)
            0: p[i] = tb_iic_ref::clamp(100 + y * 3 + int'($urandom % 5));
            1: p[i] = $urandom % 256;
            default: p[i] = (((i + y) % 2) != 0) ? 250 : 5;
          endcase
        tb_iic_ref::encode(int'(qc), y == 0, p, up, code[y], len[y], d);
        for (int i = 0; i < 4; i++) dd[y][i] = d[i];
        up = d[0];
      end
      for (int pr = 0; pr < K / LANES; pr++) begin
        exp_t e;
        @(negedge clk);
        if ($urandom % 8 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        for (int l = 0; l < LANES; l++) begin
          // bits beyond the code are random: the core must ignore them
          in_win[l]   = code_t'(code[pr*LANES+l]) |
                        (code_t'({$urandom, $urandom}) << len[pr*LANES+l]);
          in_first[l] = (pr * LANES + l) == 0;
          for (int i = 0; i < 4; i++) e.d[l][i] = dd[pr*LANES+l][i];
        end
        e.t = cycle;
        eq.push_back(e);
        #1;
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (int'(in_len[l]) != len[pr*LANES+l]) begin
            failures++;
            if (failures < 10) $display("FAIL: length %0d expected %0d", in_len[l], len[pr*LANES+l]);
          end
        end
        n_pairs++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (eq.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", eq.size()); end
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
