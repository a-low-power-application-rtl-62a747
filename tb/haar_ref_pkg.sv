// haar_ref_pkg: reference model of the chip's arithmetic for the testbenches.
//
// Works on a flat array holding an IMG x IMG signed 8-bit image row by row
// (element r*IMG + c). The functions follow the specification, not the
// hardware: plain integer arithmetic, floor division by two for the forward
// transform, wrap-around to 8 bits for the inverse, and the quantize and
// threshold rules written out with modulo arithmetic.
package haar_ref_pkg;

  typedef byte img_t[];

  function automatic int floor_half(input int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  function automatic byte wrap8(input int v);
    return byte'(v);
  endfunction

  // rule numbers 0..6, levels 0..2
  function automatic int rule_of(input int lvl, input bit hi_col, input bit hi_row);
    if (!hi_col && !hi_row) return 0;
    if (hi_col && hi_row) return (lvl == 0) ? 6 : (lvl == 1) ? 4 : 2;
    return (lvl == 0) ? 5 : (lvl == 1) ? 3 : 1;
  endfunction

  function automatic int quant(input int v, input int rule);
    int k, lim, m;
    case (rule)
      1: begin k = 1; lim = 0;  end
      2: begin k = 2; lim = 0;  end
      3: begin k = 2; lim = 64; end
      4: begin k = 3; lim = 64; end
      5: begin k = 3; lim = 8;  end
      6: begin k = 4; lim = 8;  end
      default: return v;
    endcase
    m = 1 << k;
    // round toward zero to a multiple of m
    if (v < 0) v = -((-v) / m) * m;
    else       v = (v / m) * m;
    if (lim != 0) begin
      if (v < -lim) v = -lim;
      if (v > lim)  v = lim;
    end
    return v;
  endfunction

  // the rounding steps of a rule without the clamp
  function automatic int quant_round(input int v, input int rule);
    int m;
    case (rule)
      1: m = 2;
      2, 3: m = 4;
      4, 5: m = 8;
      6: m = 16;
      default: return v;
    endcase
    return (v < 0) ? -((-v) / m) * m : (v / m) * m;
  endfunction

  // forward transform of the rows of the n x n corner, n = IMG >> lvl
  function automatic void fwd_rows(ref byte img[], input int IMG, input int lvl);
    int n = IMG >> lvl;
    int t[];
    t = new[n];
    for (int r = 0; r < n; r++) begin
      for (int k = 0; k < n / 2; k++) begin
        int a = img[r*IMG + 2*k], b = img[r*IMG + 2*k + 1];
        t[k]       = floor_half(a + b);
        t[n/2 + k] = floor_half(a - b);
      end
      for (int c = 0; c < n; c++) img[r*IMG + c] = byte'(t[c]);
    end
  endfunction

  // forward transform of the columns, with quantize and threshold
  function automatic void fwd_cols(ref byte img[], input int IMG, input int lvl);
    int n = IMG >> lvl;
    int t[];
    t = new[n];
    for (int c = 0; c < n; c++) begin
      bit hi_col = (c >= n / 2);
      for (int k = 0; k < n / 2; k++) begin
        int a = img[(2*k)*IMG + c], b = img[(2*k+1)*IMG + c];
        t[k]       = quant(floor_half(a + b), rule_of(lvl, hi_col, 1'b0));
        t[n/2 + k] = quant(floor_half(a - b), rule_of(lvl, hi_col, 1'b1));
      end
      for (int r = 0; r < n; r++) img[r*IMG + c] = byte'(t[r]);
    end
  endfunction

  function automatic void inv_cols(ref byte img[], input int IMG, input int lvl);
    int n = IMG >> lvl;
    byte t[];
    t = new[n];
    for (int c = 0; c < n; c++) begin
      for (int k = 0; k < n / 2; k++) begin
        int s = img[k*IMG + c], w = img[(n/2 + k)*IMG + c];
        t[2*k]     = wrap8(s + w);
        t[2*k + 1] = wrap8(s - w);
      end
      for (int r = 0; r < n; r++) img[r*IMG + c] = t[r];
    end
  endfunction

  function automatic void inv_rows(ref byte img[], input int IMG, input int lvl);
    int n = IMG >> lvl;
    byte t[];
    t = new[n];
    for (int r = 0; r < n; r++) begin
      for (int k = 0; k < n / 2; k++) begin
        int s = img[r*IMG + k], w = img[r*IMG + n/2 + k];
        t[2*k]     = wrap8(s + w);
        t[2*k + 1] = wrap8(s - w);
      end
      for (int c = 0; c < n; c++) img[r*IMG + c] = t[c];
    end
  endfunction

  function automatic void fwd_level(ref byte img[], input int IMG, input int lvl);
    fwd_rows(img, IMG, lvl);
    fwd_cols(img, IMG, lvl);
  endfunction

  function automatic void inv_level(ref byte img[], input int IMG, input int lvl);
    inv_cols(img, IMG, lvl);
    inv_rows(img, IMG, lvl);
  endfunction

  // cycle counts of one engine pass over an n x n corner, DONE included
  function automatic longint fwd_row_cycles(input longint n);
    return n * (10 * n / 4 + 3 * n / 2 + 3) + 1;
  endfunction
  function automatic longint fwd_col_cycles(input longint n);
    return n * (12 * n / 4 + 3 * n / 2 + 3) + 1;
  endfunction
  function automatic longint inv_cycles(input longint n);
    return n * (13 * n / 4 + 3 * n / 2 + 3) + 2;
  endfunction

endpackage
