// morph_ref_pkg: reference model used by the testbenches. Computes the
// 3 x 3 grey-scale dilation (maximum) or erosion (minimum) of a window whose
// bottom-right pixel is (r, c), straight from the image array, with no
// knowledge of line buffers or comparator trees.
package morph_ref_pkg;
  function automatic int win_ref(input int img[], input int w, input int r,
                                 input int c, input bit erode);
    int v = erode ? 1 << 30 : -1;
    for (int i = r - 2; i <= r; i++)
      for (int j = c - 2; j <= c; j++) begin
        if (erode) v = (img[i*w+j] < v) ? img[i*w+j] : v;
        else       v = (img[i*w+j] > v) ? img[i*w+j] : v;
      end
    return v;
  endfunction

  // Expected result stream of one frame, in raster order of the windows.
  function automatic void frame_ref(input int img[], input int w, input int h,
                                    input bit erode, ref int exp_q[$]);
    for (int r = 2; r < h; r++)
      for (int c = 2; c < w; c++)
        exp_q.push_back(win_ref(img, w, r, c, erode));
  endfunction
endpackage
