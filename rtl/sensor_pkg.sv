// sensor_pkg: constants and types shared by the compression sensor modules.
//
// Pixel values are carried as unsigned 8-bit codes, the resolution of the
// sensor's A/D converter. A brighter pixel has a larger code. The array is
// 64 x 64 pixels; the modules take the array size as parameters whose
// defaults come from here.
package sensor_pkg;

  // Resolution of a pixel value (8-bit A/D converter).
  localparam int unsigned PIX_W = 8;
  // Pixel array size (64 x 64 photodiodes).
  localparam int unsigned N_ROWS = 64;
  localparam int unsigned N_COLS = 64;

  typedef logic [PIX_W-1:0] pixel_t;

  // Absolute difference of two pixel codes.
  function automatic pixel_t abs_diff(input pixel_t a, input pixel_t b);
    return (a > b) ? pixel_t'(a - b) : pixel_t'(b - a);
  endfunction

endpackage
