// Reference arithmetic and test data shared by the testbenches.
//
// The reference is written independently of the RTL: elements are 16-bit
// signed Q8.8, a product is shifted right arithmetically by 8 and truncated,
// sums wrap at 16 bits.  Input vectors are generated from the column index,
// so a memory model can serve any column without storing tables.
package lift_tb_pkg;

  function automatic shortint ref_mac(shortint acc, shortint a, shortint x);
    int p;
    p = int'(a) * int'(x);
    return shortint'(int'(acc) + (p >>> 8));
  endfunction

  // element e of the input vector of column col, in [-1.0, 1.0)
  function automatic shortint vec_elem(int col, int e);
    return shortint'(((col * 131 + e * 29 + 7) % 512) - 256);
  endfunction

  // chunk c (4 elements) of column col
  function automatic logic [63:0] vec_chunk(int col, int c);
    logic [63:0] w;
    for (int l = 0; l < 4; l++) w[l*16 +: 16] = vec_elem(col, c * 4 + l);
    return w;
  endfunction

endpackage
