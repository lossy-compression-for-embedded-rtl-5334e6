// tb_iic_ref: reference model of the IIC coding scheme for the testbenches.
//
// Written separately from the RTL, in plain procedural code: its own copy of
// the quantizer's reconstruction levels, a nearest-level search for the
// quantizer, the sub-block encoder (DPCM over p0..p3, coding mode = widest
// two's-complement residual, code layout raw p0 | CM | residuals, LSB first)
// and the matching decoder. Also a test-image generator with smooth ramps,
// noise, hard edges and flat areas, so every coding mode occurs.
package tb_iic_ref;

  int unsigned LV [4][16] = '{
    '{0, 1, 2, 3, 4, 5, 6, 8, 10, 13, 17, 23, 32, 48, 80, 160},
    '{0, 2, 4, 6, 8, 10, 13, 16, 20, 25, 32, 42, 56, 80, 120, 200},
    '{0, 3, 6, 9, 12, 16, 20, 25, 31, 38, 48, 60, 80, 108, 150, 210},
    '{0, 4, 8, 12, 16, 21, 27, 34, 42, 52, 64, 80, 100, 128, 168, 224}
  };

  function automatic int quant(int qc, int r);
    int a, best, berr, e;
    a = (r < 0) ? -r : r;
    best = 0;
    berr = a;
    for (int k = 1; k < 16; k++) begin
      e = a - int'(LV[qc][k]);
      if (e < 0) e = -e;
      if (e < berr) begin berr = e; best = k; end
    end
    return (r < 0) ? -best : best;
  endfunction

  function automatic int recon(int qc, int q);
    return (q < 0) ? -int'(LV[qc][-q]) : int'(LV[qc][q]);
  endfunction

  function automatic int clamp(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic int width_of(int q);
    for (int l = 0; l <= 5; l++)
      if (l == 0 ? (q == 0) : (q >= -(1 << (l - 1)) && q < (1 << (l - 1)))) return l;
    return 6;
  endfunction

  // Encode one sub-block; d[] returns the reconstructed pixels.
  task automatic encode(input int qc, input bit first, input int p[4], input int up,
                        output logic [63:0] code, output int len, output int d[4]);
    int q[4], pred, l;
    for (int i = 0; i < 4; i++) begin
      pred = (i == 0) ? up : d[i-1];
      if (i == 0 && first) begin
        q[0] = 0;
        d[0] = p[0];
      end else begin
        q[i] = quant(qc, p[i] - pred);
        d[i] = clamp(pred + recon(qc, q[i]));
      end
    end
    l = 0;
    for (int i = 0; i < 4; i++) if (width_of(q[i]) > l) l = width_of(q[i]);
    code = '0;
    len  = 0;
    if (first) begin
      code[7:0] = p[0][7:0];
      len = 8;
    end
    for (int b = 0; b < 3; b++) code[len + b] = l[b];
    len += 3;
    for (int i = first ? 1 : 0; i < 4; i++) begin
      for (int b = 0; b < l; b++) code[len + b] = q[i][b];
      len += l;
    end
  endtask

  // Decode one sub-block from a bit window; returns its length.
  task automatic decode(input int qc, input bit first, input logic [63:0] win, input int up,
                        output int d[4], output int len);
    int pos, l, q, pred;
    pos = 0;
    if (first) begin
      d[0] = int'(win[7:0]);
      pos = 8;
    end
    l = int'(win[pos +: 3]);
    pos += 3;
    for (int i = first ? 1 : 0; i < 4; i++) begin
      q = 0;
      for (int b = 0; b < l; b++) q[b] = win[pos + b];
      if (l > 0 && win[pos + l - 1]) q = q - (1 << l);
      pos += l;
      pred = (i == 0) ? up : d[i-1];
      d[i] = clamp(pred + recon(qc, q));
    end
    len = pos;
  endtask

  // Test image: regions of ramps, noise, edges, flat grey and shallow slopes.
  function automatic int pixel(int x, int y, int seed);
    int region, v;
    region = ((x / 24) + (y / 16) + seed) % 6;
    case (region)
      0: v = (x * 3 + y * 2 + seed) % 256;                    // ramp
      1: v = ($urandom & 255);                                // noise
      2: v = ((((x / 5) + (y / 3)) % 2) != 0) ? 230 : 20;     // hard edges
      3: v = 128 + seed % 7;                                  // flat
      4: v = 200 - 2 * (x % 32) - int'($urandom % 2);          // shallow slope
      default: v = clamp(100 + (x % 16) * 6 - (y % 8) * 3 + int'($urandom % 9) - 4);
    endcase
    return v;
  endfunction

endpackage
