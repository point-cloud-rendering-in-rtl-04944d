// prc_ref_pkg: reference models used by the testbenches of the point cloud
// rendering engine. They compute, pixel by pixel and without the hardware's
// word-level pipeline, what an element should draw.
package prc_ref_pkg;

  // Pixel columns covered by row r (0..7) of an element, relative to its X.
  // lo > hi means the row is empty.
  function automatic void row_span(input logic [63:0] code, input int r,
                                   output int lo, output int hi);
    int sos, los, k;
    bit mirrored;
    mirrored = 0;
    k = r;
    if (r >= 4) begin
      if (code[0]) begin lo = 0; hi = -1; return; end  // large fragment: rows 4..7 empty
      k = 7 - r;
      mirrored = 1;
    end
    sos = int'(code[1 + 6*k +: 3]);
    los = int'(code[4 + 6*k +: 3]);
    if (los == 0) begin lo = 0; hi = -1; return; end
    // small point: central symmetry, column c of row k appears as column
    // 6 - c of row 7 - k
    if (mirrored) begin
      lo = 6 - (sos + los - 1);
      hi = 6 - sos;
    end else begin
      lo = sos;
      hi = sos + los - 1;
    end
  endfunction

  function automatic int sat8(input int v);
    return (v > 255) ? 255 : v;
  endfunction

  // colour of one channel: I0 + kd*D/128 + ks*S/128, saturated
  function automatic int shade(input int i0, input int kd, input int ks, input int d, input int s);
    return sat8(i0 + (kd * d) / 128 + (ks * s) / 128);
  endfunction

  function automatic logic [63:0] make_code(input bit mode, input logic [23:0] scans,
                                            input int dif, input int spec, input int mat,
                                            input int x, input int z);
    logic [63:0] c;
    c = '0;
    c[0]     = mode;
    c[24:1]  = scans;
    c[31:25] = 7'(dif);
    c[38:32] = 7'(spec);
    c[45:39] = 7'(mat);
    c[54:46] = 9'(x);
    c[63:55] = 9'(z);
    return c;
  endfunction

  // random scans: each stored row gets a start and a length that fit the
  // 8-column bitmap (start + length <= 8), or is empty
  function automatic logic [23:0] rand_scans();
    logic [23:0] s;
    for (int k = 0; k < 4; k++) begin
      int sos, los;
      sos = $urandom_range(0, 7);
      los = ($urandom_range(0, 5) == 0) ? 0 : $urandom_range(1, 7);
      if (sos + los > 8) los = 8 - sos;
      s[6*k +: 3]     = 3'(sos);
      s[6*k + 3 +: 3] = 3'(los);
    end
    return s;
  endfunction

endpackage
