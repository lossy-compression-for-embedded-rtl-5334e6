// tb_iic_bit_packer: random codes of random length in lines of 2 to 12
// sub-blocks, sent back to back and with gaps. The emitted words are
// compared with a reference bit queue split into 64-bit words, one line at
// a time with the last word zero-padded and flagged. The case where a
// line's final word must be held for a cycle is counted and must occur.
module tb_iic_bit_packer;
  import iic_pkg::*;
  localparam int W = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid, in_last;
  code_t        in_code;
  len_t         in_len;
  logic         out_valid, out_last;
  logic [W-1:0] out_data;

  iic_bit_packer #(.W(W)) u_dut (.*);

  logic [W-1:0] ew [$];
  bit           el [$];
  int checks = 0, failures = 0, n_held = 0;
  logic prev_valid;

  always @(posedge clk) if (rst_n) begin
    prev_valid <= out_valid && !out_last;
    if (out_valid) begin
      checks++;
      if (out_last && prev_valid && !in_valid) n_held++;
      if (ew.size() == 0) begin failures++; $display("FAIL: unexpected word"); end
      else begin
        logic [W-1:0] w;
        bit l;
        w = ew.pop_front();
        l = el.pop_front();
        if (out_data != w || out_last != l) begin
          failures++;
          if (failures < 10) $display("FAIL: word %h last %b, expected %h %b", out_data, out_last, w, l);
        end
      end
    end
  end

  initial begin
    bit bits [$];
    logic [63:0] sc [$];
    int sl [$];
    bit sx [$];
    int n, len;
    logic [63:0] code;
    in_valid = 0; in_last = 0; in_code = '0; in_len = '0;
    prev_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Build all lines and their expected words first, then drive them.
    for (int line = 0; line < 400; line++) begin
      n = 2 + $urandom % 11;
      bits.delete();
      for (int s = 0; s < n; s++) begin
        len  = 3 + $urandom % 24;
        code = {$urandom, $urandom};
        for (int b = len; b < 64; b++) code[b] = 1'b0;
        for (int b = 0; b < len; b++) bits.push_back(code[b]);
        sc.push_back(code);
        sl.push_back(len);
        sx.push_back(s == n - 1);
      end
      while (bits.size() > 0) begin
        logic [W-1:0] w;
        w = '0;
        for (int b = 0; b < W && bits.size() > 0; b++) w[b] = bits.pop_front();
        ew.push_back(w);
        el.push_back(bits.size() == 0);
      end
    end
    foreach (sc[i]) begin
      @(negedge clk);
      while ($urandom % 6 == 0 && !(i > 0 && sx[i-1])) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      in_code  = code_t'(sc[i]);
      in_len   = len_t'(sl[i]);
      in_last  = sx[i];
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (ew.size() != 0) begin failures++; $display("FAIL: %0d words missing", ew.size()); end
    checks++;
    if (n_held == 0) begin failures++; $display("FAIL: final word never held"); end
    $display("held final words: %0d", n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
