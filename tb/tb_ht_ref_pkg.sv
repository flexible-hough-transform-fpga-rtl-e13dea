// tb_ht_ref_pkg: reference model of the HT binning, written independently of the RTL.
//
// Scaling (same convention as the RTL): phi0 column j covers phi codes
// [8192 + 1024*j, 8192 + 1024*(j+1)), 48 columns; qA/pt row k has slope 2k-167 in units of
// 1/64 phi code per r code, 168 rows. The reference computes with longint and explicit floor
// divisions, and finds the qA/pt row of the second formula by searching all rows.
package tb_ht_ref_pkg;

  localparam int REF_NQ = 168;
  localparam int REF_NP = 48;

  function automatic longint floordiv(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  // Column hit in row k, or -1.
  function automatic int ref_col(input int phi, input int r, input int k);
    longint code, col;
    code = longint'(phi) + floordiv(longint'(r) * longint'(2 * k - 167), 64);
    col  = floordiv(code - 8192, 1024);
    if (col < 0 || col >= REF_NP) return -1;
    return int'(col);
  endfunction

  // Row hit in column j (second formula), or -1.
  function automatic int ref_row(input int phi, input int r, input int j);
    longint t;
    if (r == 0) return -1;
    t = floordiv((longint'(8192 + 1024 * j + 512) - longint'(phi)) * 64, longint'(r));
    for (int k = 0; k < REF_NQ; k++)
      if (t >= longint'(2 * k - 168) && t < longint'(2 * k - 166)) return k;
    return -1;
  endfunction

  function automatic bit ref_hit(input bit form, input int phi, input int r,
                                 input int k, input int j);
    if (!form) return ref_col(phi, r, k) == j;
    return ref_row(phi, r, j) == k;
  endfunction

  // phi code of a cluster at radius r on the track through the centre of cell (k, j).
  function automatic int track_phi(input int r, input int k, input int j);
    return 8192 + 1024 * j + 512 - int'(floordiv(longint'(r) * longint'(2 * k - 167), 64));
  endfunction

endpackage
