// Test helpers shared by the testbenches: the gray level stored at each pixel
// index of the test image, and independent reference models of the four
// point operations.
package tb_img_pkg;
  // Test image: a scrambled ramp that reaches every gray level.
  function automatic logic [7:0] pix_at(input int unsigned i);
    return 8'((i * 73) ^ (i >> 5) ^ ((i >> 11) * 29));
  endfunction

  function automatic int clamp255(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic int ref_contrast(input int p, input int low, input int gain);
    return (p < low) ? 0 : clamp255(((p - low) * gain) / 256);
  endfunction

  function automatic int ref_bright(input int p, input int offset);
    return clamp255(p + offset);
  endfunction

  function automatic int ref_thresh(input int p, input int level);
    return (p >= level) ? 255 : 0;
  endfunction

  function automatic int ref_negative(input int p);
    return 255 - p;
  endfunction
endpackage
