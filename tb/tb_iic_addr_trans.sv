// tb_iic_addr_trans: random word requests from the eight lines of a strip,
// random hold and memory refusals, random response latency, and strip
// changes. A model of the unit predicts which line is served (the lowest
// waiting one without a word in flight) and the word address
// (strip line * LINE_WORDS + words already fetched); idle is checked too.
module tb_iic_addr_trans;
  import iic_pkg::*;
  localparam int IMG_W = 64, IMG_H = 32, K = 8, W = 64;
  localparam int LINE_WORDS = line_words(IMG_W, W);
  localparam int AW = $clog2(IMG_H * LINE_WORDS);
  localparam int LIW = $clog2(K), YW = $clog2(IMG_H);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           strip_start;
  logic [YW-1:0]  strip_y0;
  logic [K-1:0]   low;
  logic           hold;
  logic           rd_valid, rd_ready;
  logic [AW-1:0]  rd_addr;
  logic [LIW-1:0] rd_line;
  logic           rsp_valid;
  logic [LIW-1:0] rsp_line;
  logic           idle;

  iic_addr_trans #(.IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .W(W)) u_dut (.*);

  int wp [K];
  bit infl [K];
  int y0 = 0;
  int checks = 0, failures = 0, n_issued = 0, n_hold = 0;
  typedef struct { int line; int due; } r_t;
  r_t rq [$];
  int cycle = 0;

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL at %0d: %s", cycle, s);
  endtask

  // Model check and bookkeeping at each rising edge.
  always @(posedge clk) if (rst_n) begin
    int exp_line;
    bit any_idle;
    cycle++;
    exp_line = -1;
    for (int j = K - 1; j >= 0; j--) if (low[j] && !infl[j]) exp_line = j;
    if (hold || strip_start) exp_line = -1;
    if (hold) n_hold++;
    any_idle = 1;
    for (int j = 0; j < K; j++) if (infl[j]) any_idle = 0;
    checks++;
    if (idle != any_idle) fail("idle wrong");
    checks++;
    if (rd_valid != (exp_line >= 0)) fail($sformatf("rd_valid %b, expected line %0d", rd_valid, exp_line));
    else if (rd_valid) begin
      checks++;
      if (int'(rd_line) != exp_line || int'(rd_addr) != (y0 + exp_line) * LINE_WORDS + wp[exp_line])
        fail($sformatf("line %0d addr %0d, expected %0d %0d", rd_line, rd_addr, exp_line,
                       (y0 + exp_line) * LINE_WORDS + wp[exp_line]));
    end
    if (strip_start) begin
      y0 = int'(strip_y0);
      for (int j = 0; j < K; j++) begin wp[j] = 0; infl[j] = 0; end
    end else begin
      if (rsp_valid) infl[rsp_line] = 0;
      if (rd_valid && rd_ready) begin
        infl[rd_line] = 1;
        wp[rd_line]++;
        n_issued++;
        rq.push_back('{int'(rd_line), cycle + 1 + int'($urandom % 5)});
      end
    end
  end

  always @(negedge clk) begin
    rd_ready <= ($urandom % 3) != 0;
    hold     <= ($urandom % 10) == 0;
    for (int j = 0; j < K; j++) low[j] <= (wp[j] < LINE_WORDS) && (($urandom % 2) != 0);
    if (rq.size() > 0 && rq[0].due <= cycle) begin
      r_t r;
      r = rq.pop_front();
      rsp_valid <= 1;
      rsp_line  <= LIW'(r.line);
    end else rsp_valid <= 0;
  end

  initial begin
    strip_start = 0; strip_y0 = '0; low = '0; hold = 0; rd_ready = 0;
    rsp_valid = 0; rsp_line = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 12; s++) begin
      // new strip once nothing is in flight
      @(negedge clk);
      force hold = 1'b1;
      while (!idle || rq.size() != 0) @(negedge clk);
      strip_start = 1;
      strip_y0 = YW'(($urandom % (IMG_H / K)) * K);
      @(negedge clk);
      strip_start = 0;
      release hold;
      repeat (60) @(negedge clk);
    end
    checks++;
    if (n_issued < 100 || n_hold == 0) fail("too few reads or no hold");
    $display("reads %0d, hold cycles %0d", n_issued, n_hold);
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
