// tb_iic_line_recomp: the eight lines of a strip are coded by the reference
// encoder and served as 64-bit words whenever the block asks (low), after a
// random latency, one word in flight per line. Columns are requested with
// random gaps. For every lane pair the window must start with the expected
// code of that line and column, with the right top-of-block flag; lengths
// are fed back as a decompress core would. Stalls for data must occur, and
// no line may ask for words once its last sub-block is taken. Three strips.
module tb_iic_line_recomp;
  import iic_pkg::*;
  localparam int IMG_W = 64, K = 8, M = 8, W = 64, LANES = 2;
  localparam int SB = IMG_W / 4, LIW = $clog2(K);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           strip_start;
  logic           col_req_valid, col_req_ready;
  logic           rsp_valid;
  logic [W-1:0]   rsp_data;
  logic [LIW-1:0] rsp_line;
  logic [K-1:0]   low;
  logic           c_valid;
  code_t          c_win   [LANES];
  logic           c_first [LANES];
  len_t           c_len   [LANES];
  logic           stall;

  iic_line_recomp #(.IMG_W(IMG_W), .K(K), .M(M), .W(W), .LANES(LANES)) u_dut (.*);

  logic [63:0]  codes [K][SB];
  int           lens  [K][SB];
  logic [W-1:0] words [K][$];
  int           wp [K];
  bit           infl [K];
  int           col_seen, pair_seen;
  int checks = 0, failures = 0, n_stall = 0, cols_req = 0;
  int cycle = 0;
  typedef struct { int line; int due; } r_t;
  r_t rq [$];
  bit active = 0;

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL at %0d: %s", cycle, s);
  endtask

  // Code a strip of random image content.
  task automatic build_strip(input int seed);
    bit bits [$];
    int p[4], d[4], up;
    for (int j = 0; j < K; j++) begin
      bits.delete();
      words[j].delete();
      for (int c = 0; c < SB; c++) begin
        for (int i = 0; i < 4; i++) p[i] = tb_iic_ref::pixel(4 * c + i, j, seed);
        up = $urandom % 256;
        tb_iic_ref::encode(seed % 4, (j % M) == 0, p, up, codes[j][c], lens[j][c], d);
        for (int b = 0; b < lens[j][c]; b++) bits.push_back(codes[j][c][b]);
      end
      while (bits.size() > 0) begin
        logic [W-1:0] w;
        w = '0;
        for (int b = 0; b < W && bits.size() > 0; b++) w[b] = bits.pop_front();
        words[j].push_back(w);
      end
      words[j].push_back({$urandom, $urandom});   // next line's data in the slot
      wp[j] = 0;
      infl[j] = 0;
    end
    col_seen = 0;
    pair_seen = 0;
  endtask

  // lengths as the decompress core reports them
  always_comb
    for (int l = 0; l < LANES; l++)
      c_len[l] = code_len(c_first[l], c_first[l] ? c_win[l][10:8] : c_win[l][2:0]);

  always @(posedge clk) if (rst_n && !strip_start) begin
    cycle++;
    if (stall) n_stall++;
    if (c_valid) begin
      for (int l = 0; l < LANES; l++) begin
        int j;
        logic [63:0] m;
        j = pair_seen * LANES + l;
        m = (64'd1 << lens[j][col_seen]) - 1;
        checks++;
        if ((64'(c_win[l]) & m) != codes[j][col_seen] || c_first[l] != ((j % M) == 0))
          fail($sformatf("line %0d col %0d window %h expected %h", j, col_seen, c_win[l], codes[j][col_seen]));
      end
      if (pair_seen == K / LANES - 1) begin pair_seen = 0; col_seen++; end
      else pair_seen++;
    end
    for (int j = 0; j < K; j++)
      if (low[j] && !infl[j]) begin
        if (wp[j] >= words[j].size()) fail($sformatf("line %0d reads past its data", j));
        else begin
          infl[j] = 1;
          rq.push_back('{j, cycle + 1 + int'($urandom % 8)});
        end
        break;
      end
    if (rsp_valid) infl[rsp_line] = 0;
  end

  always @(negedge clk) begin
    if (rq.size() > 0 && rq[0].due <= cycle) begin
      r_t r;
      r = rq.pop_front();
      rsp_valid <= 1;
      rsp_line  <= LIW'(r.line);
      rsp_data  <= words[r.line][wp[r.line]];
      wp[r.line]++;
    end else rsp_valid <= 0;
  end

  initial begin
    strip_start = 0; col_req_valid = 0; rsp_valid = 0; rsp_data = '0; rsp_line = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      build_strip(s);
      @(negedge clk);
      strip_start = 1;
      @(negedge clk);
      strip_start = 0;
      cols_req = 0;
      while (cols_req < SB) begin
        col_req_valid = ($urandom % 4) != 0;
        @(posedge clk);
        if (col_req_valid && col_req_ready) cols_req++;
        @(negedge clk);
      end
      col_req_valid = 0;
      while (col_seen < SB) @(negedge clk);
      repeat (20) @(negedge clk);
      checks++;
      if (low != '0 || rq.size() != 0) fail("lines still asking for words after the strip");
    end
    checks++;
    if (n_stall == 0) fail("never stalled for data");
    $display("stall cycles %0d", n_stall);
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
