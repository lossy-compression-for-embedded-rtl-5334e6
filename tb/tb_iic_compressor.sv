// tb_iic_compressor: two 64 x 24 frames (three compression blocks high)
// through the compression stage, with input gaps; every memory write,
// address and data, is compared with the reference encoder's per-line
// word stream, and frame_done / frame_words with the reference totals.
module tb_iic_compressor;
  import iic_pkg::*;
  localparam int IMG_W = 64, IMG_H = 24, M = 8, W = 64;
  localparam int SB = IMG_W / 4;
  localparam int LINE_WORDS = line_words(IMG_W, W);
  localparam int AW = $clog2(IMG_H * LINE_WORDS);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qc_t           qc;
  logic          in_valid;
  subblk_t       in_pix;
  logic          wr_valid;
  logic [AW-1:0] wr_addr;
  logic [W-1:0]  wr_data;
  logic          frame_done;
  logic [31:0]   frame_words;

  iic_compressor #(.IMG_W(IMG_W), .IMG_H(IMG_H), .M(M), .W(W)) u_dut (.*);

  int img [IMG_H][IMG_W];
  int rec [IMG_H][IMG_W];
  logic [W-1:0] ed [$];
  int           ea [$];
  int total, checks = 0, failures = 0;

  always @(posedge clk) if (rst_n && wr_valid) begin
    checks++;
    if (ea.size() == 0) begin failures++; $display("FAIL: unexpected write"); end
    else begin
      int a;
      logic [W-1:0] d;
      a = ea.pop_front();
      d = ed.pop_front();
      if (int'(wr_addr) != a || wr_data != d) begin
        failures++;
        if (failures < 10) $display("FAIL: write %0d %h, expected %0d %h", wr_addr, wr_data, a, d);
      end
    end
  end

  task automatic run_frame(input int q, input int seed);
    bit bits [$];
    logic [63:0] code;
    int len, p[4], d[4], up, idx;
    total = 0;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) img[y][x] = tb_iic_ref::pixel(x, y, seed);
    for (int y = 0; y < IMG_H; y++) begin
      bits.delete();
      for (int c = 0; c < SB; c++) begin
        for (int i = 0; i < 4; i++) p[i] = img[y][4*c+i];
        up = (y % M == 0) ? 0 : rec[y-1][4*c];
        tb_iic_ref::encode(q, (y % M) == 0, p, up, code, len, d);
        for (int i = 0; i < 4; i++) rec[y][4*c+i] = d[i];
        for (int b = 0; b < len; b++) bits.push_back(code[b]);
      end
      idx = 0;
      while (bits.size() > 0) begin
        logic [W-1:0] w;
        w = '0;
        for (int b = 0; b < W && bits.size() > 0; b++) w[b] = bits.pop_front();
        ed.push_back(w);
        ea.push_back(y * LINE_WORDS + idx);
        idx++;
      end
      total += idx;
    end
    qc = 2'(q);
    for (int y = 0; y < IMG_H; y++)
      for (int c = 0; c < SB; c++) begin
        @(negedge clk);
        while ($urandom % 5 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        for (int i = 0; i < 4; i++) in_pix[i] = 8'(img[y][4*c+i]);
      end
    @(negedge clk);
    in_valid = 0;
    while (!frame_done) @(negedge clk);
    checks++;
    if (int'(frame_words) != total) begin
      failures++;
      $display("FAIL: frame_words %0d expected %0d", frame_words, total);
    end
    checks++;
    if (ea.size() != 0) begin failures++; $display("FAIL: %0d writes missing", ea.size()); end
  endtask

  initial begin
    in_valid = 0; in_pix = '0; qc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_frame(0, 1);
    run_frame(2, 4);
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
