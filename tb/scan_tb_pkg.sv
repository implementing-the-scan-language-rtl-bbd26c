// scan_tb_pkg: reference material shared by the testbenches.
//  - Scan orders of one level with side a, as lists of pel indices
//    (index = row*a + col): raster R, the B pattern of a 2x2 level
//    (0,1,3,2), the X pattern of a 2x2 level (0,3,1,2) and the A pattern
//    (for each k: down column k from row 0 to row k, then left along
//    row k), which gives 0,1,6,5,2,7,12,11,10,3,... for a = 5.
//  - scan_index(): the pixel index of one step of the nested-loop
//    sequential SCAN algorithm, computed with divisions and products of
//    the level sizes, independently of any bit slicing.
package scan_tb_pkg;

  typedef int unsigned order_t [$];

  function automatic order_t order_r(int unsigned a);
    order_t o;
    for (int unsigned i = 0; i < a * a; i++) o.push_back(i);
    return o;
  endfunction

  function automatic order_t order_a(int unsigned a);
    order_t o;
    for (int unsigned k = 0; k < a; k++) begin
      for (int unsigned r = 0; r <= k; r++) o.push_back(r * a + k);
      for (int c = int'(k) - 1; c >= 0; c--) o.push_back(k * a + c);
    end
    return o;
  endfunction

  function automatic order_t order_b2();
    order_t o = '{0, 1, 3, 2};
    return o;
  endfunction

  function automatic order_t order_x2();
    order_t o = '{0, 3, 1, 2};
    return o;
  endfunction

  // Pixel index (row*side + col) of pel indices pel[0..L-1], level 0
  // coarsest, on a picture with level sides a[0..L-1].
  function automatic int unsigned pixel_index(int unsigned a [$], int unsigned pel [$]);
    int unsigned side = 1, ppp, row = 0, col = 0;
    foreach (a[l]) side *= a[l];
    ppp = side;
    foreach (a[l]) begin
      ppp = ppp / a[l];
      row += (pel[l] / a[l]) * ppp;
      col += (pel[l] % a[l]) * ppp;
    end
    return row * side + col;
  endfunction

endpackage
