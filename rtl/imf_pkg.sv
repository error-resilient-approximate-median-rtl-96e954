// imf_pkg: types and constants shared by the inexact median filter.
//
// The filter works on 8-bit grey-scale pixels. A salt is a pixel at full
// intensity (255) and a pepper a pixel at zero. Magnitude comparison is done
// on 2-bit slices; each slice comparator (TBC) can be exact or use one of
// three approximations, selected by cmp_mode_e:
//   CMP_EXACT  exact two-bit comparator
//   CMP_IMFP   exact whenever a slice holds 00, so comparisons against a
//              pepper (0) are exact                       (filter "IMFP")
//   CMP_IMFS   exact whenever a slice holds 11, so comparisons against a
//              salt (255) are exact                       (filter "IMFS")
//   CMP_IMFSP  exact for slices holding 00 or 11, so both salt and pepper
//              compare exactly                            (filter "IMFSP")
// The three inexact variants are the ones the filter design proposes; the
// exact one is kept as the reference for comparisons.
package imf_pkg;

  localparam int unsigned PIX_W = 8;     // pixel width in bits
  localparam int unsigned WIN_N = 9;     // pixels in a 3x3 window

  typedef logic [PIX_W-1:0] pixel_t;

  typedef enum logic [1:0] {
    CMP_EXACT = 2'd0,
    CMP_IMFP  = 2'd1,
    CMP_IMFS  = 2'd2,
    CMP_IMFSP = 2'd3
  } cmp_mode_e;

  localparam pixel_t PEPPER = '0;
  localparam pixel_t SALT   = '1;

endpackage
