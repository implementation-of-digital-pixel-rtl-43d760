// tb_ref_pkg: reference model used by the testbenches.
//
// Independent of the RTL: the kernels are written out again as text, one
// string per kernel row ('+' = +1, '-' = -1, '.' = 0), and the convolution,
// maximum selection, thresholding, accumulated-edge-map and motion rules are
// recomputed here with plain integers.
package tb_ref_pkg;

  typedef int kern_t [4][5][5];

  function automatic kern_t ref_kernels();
    string rows [4][5] = '{
      '{".....", "+++++", ".....", "-----", "....."},   // horizontal
      '{".+...", "-.++.", ".-.+.", ".--.+", "...-."},   // -45 degree
      '{".+.-.", ".+.-.", ".+.-.", ".+.-.", ".+.-."},   // vertical
      '{"...+.", ".++.-", ".+.-.", "+.--.", ".-..."}    // +45 degree
    };
    kern_t k;
    for (int d = 0; d < 4; d++)
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++)
          k[d][r][c] = (rows[d][r][c] == "+") ? 1 : (rows[d][r][c] == "-") ? -1 : 0;
    return k;
  endfunction

  // Largest |convolution| over the four kernels of the 5x5 patch whose
  // top-left pixel is (r0, c0) of img, and the first direction reaching it.
  function automatic void ref_max(input int img [][], input int r0, input int c0,
                                  input kern_t k, output int grad, output int dir);
    grad = -1; dir = 0;
    for (int d = 0; d < 4; d++) begin
      int s = 0;
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++)
          s += k[d][r][c] * img[r0 + r][c0 + c];
      if (s < 0) s = -s;
      if (s > grad) begin grad = s; dir = d; end
    end
  endfunction

endpackage
