// tb_iic_block_recomp: the line side is modelled: column requests are
// accepted at random, each answered a few cycles later by four lane pairs
// whose pixels encode (strip, column, row, x). Vision-block requests walk a
// strip without overlap, with overlap (columns reused from the buffer),
// backwards (strip restart), across strips and at random; every returned
// block, the hit counter and the ordering of strip_start after fetch_hold
// and line_idle are checked.
module tb_iic_block_recomp;
  import iic_pkg::*;
  localparam int IMG_W = 64, IMG_H = 32, K = 8, LANES = 2;
  localparam int SB = IMG_W / 4, NS = IMG_H / K, D = K / 4;
  localparam int YW = $clog2(IMG_H), SW = $clog2(NS), CW = $clog2(SB);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     vreq_valid, vreq_ready;
  logic [SW-1:0]            vreq_strip;
  logic [CW-1:0]            vreq_col;
  logic                     vblk_valid;
  logic [K-1:0][K-1:0][7:0] vblk;
  logic                     strip_start;
  logic [YW-1:0]            strip_y0;
  logic                     fetch_hold;
  logic                     line_idle;
  logic                     col_req_valid, col_req_ready;
  logic                     dec_valid;
  subblk_t                  dec_pix [LANES];
  logic [31:0]              hit_cols, miss_cols, strip_starts;

  iic_block_recomp #(.IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .LANES(LANES)) u_dut (.*);

  function automatic logic [7:0] pat(int s, int c, int r, int x);
    return 8'(s * 61 + c * 17 + r * 5 + x * 3 + 7);
  endfunction

  int checks = 0, failures = 0, restarts = 0;
  int cur_strip = 0, next_col = 0, busy = 0;
  int cols_q [$];

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL: %s", s);
  endtask

  // line side model
  always @(posedge clk) if (rst_n) begin
    if (strip_start) begin
      checks++;
      if (!line_idle || !fetch_hold || busy != 0 || cols_q.size() != 0) fail("strip_start while the line side is busy");
      cur_strip = int'(strip_y0) / K;
      next_col = 0;
    end
    if (col_req_valid && col_req_ready) begin
      cols_q.push_back(next_col);
      next_col++;
    end
  end

  initial begin
    dec_valid = 0;
    for (int l = 0; l < LANES; l++) dec_pix[l] = '0;
    forever begin
      @(negedge clk);
      dec_valid = 0;
      if (cols_q.size() > 0) begin
        int c;
        c = cols_q.pop_front();
        busy = 1;
        repeat ($urandom % 4) @(negedge clk);
        for (int p = 0; p < K / LANES; p++) begin
          dec_valid = 1;
          for (int l = 0; l < LANES; l++)
            for (int i = 0; i < 4; i++) dec_pix[l][i] = pat(cur_strip, c, p * LANES + l, i);
          @(negedge clk);
        end
        dec_valid = 0;
        busy = 0;
      end
    end
  end

  always @(negedge clk) begin
    col_req_ready <= ($urandom % 3) != 0;
    // words in flight drain while reads are held: once idle, stay idle
    line_idle     <= fetch_hold ? (line_idle || (($urandom % 3) == 0)) : (($urandom % 2) == 0);
  end

  task automatic get_block(input int s, input int c);
    int bad, ss0;
    ss0 = int'(strip_starts);
    @(negedge clk);
    vreq_valid = 1;
    vreq_strip = SW'(s);
    vreq_col   = CW'(c);
    do @(posedge clk); while (!vreq_ready);
    bad = 0;
    for (int r = 0; r < K; r++)
      for (int x = 0; x < K; x++)
        if (vblk[r][x] != pat(s, c + x / 4, r, x % 4)) bad++;
    checks++;
    if (!vblk_valid || bad != 0) fail($sformatf("block strip %0d col %0d: %0d pixels wrong", s, c, bad));
    @(negedge clk);
    vreq_valid = 0;
  endtask

  initial begin
    int h0;
    vreq_valid = 0; vreq_strip = '0; vreq_col = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c + D <= SB; c += D) get_block(0, c);
    h0 = int'(hit_cols);
    for (int c = 0; c + D <= SB; c++) get_block(2, c);
    checks++;
    if (int'(hit_cols) - h0 != (SB - D)) fail($sformatf("%0d hits, expected %0d", int'(hit_cols) - h0, SB - D));
    h0 = int'(strip_starts);
    get_block(2, 3);
    checks++;
    if (int'(strip_starts) != h0 + 1) fail("backward request did not restart the strip");
    for (int i = 0; i < 60; i++) get_block($urandom % NS, $urandom % (SB - D + 1));
    $display("hits %0d misses %0d strip starts %0d", hit_cols, miss_cols, strip_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
