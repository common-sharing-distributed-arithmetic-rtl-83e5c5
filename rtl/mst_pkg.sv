// Shared types and constants of the multi-standard transform (MST) core.
//
// The core computes forward 8-point transforms (MPEG-1/2/4 DCT, H.264 8x8
// integer transform, VC-1 8x8 transform) and pairs of 4-point transforms
// (H.264 4x4, VC-1 4x4). All of them share the symmetric even/odd coefficient
// structure
//     even rows:  [C4 C4 C4 C4; C2 C6 -C6 -C2; C4 -C4 -C4 C4; C6 -C2 C2 -C6]
//     odd rows:   [C1 C3 C5 C7; C3 -C7 -C1 -C5; C5 -C1 C7 C3; C7 -C5 C3 -C1]
// so a standard is fully described by the magnitudes C1..C7 and one output
// scaling shift. The even/odd structure follows the design description; the
// coefficient values are those of the standards themselves and the scaling
// shifts are this design's choice (picked so a 9-bit input gives a 12-bit
// first-stage result and a 14-bit second-stage result without overflow).
//
// Every result of a 1-D pass is   round( (C . x) / 2^SHIFT )   computed by
// distributed arithmetic over the CW coefficient bit planes.
package mst_pkg;

  // Number of coefficient bit planes (largest magnitude is 126 < 2^7).
  localparam int unsigned CW = 7;

  // Transform standard / size selection.
  typedef enum logic [2:0] {
    MODE_MPEG8  = 3'd0,  // MPEG-1/2/4 8-point DCT (coefficients in Q8)
    MODE_H264_8 = 3'd1,  // H.264 8-point integer transform
    MODE_VC1_8  = 3'd2,  // VC-1 8-point transform
    MODE_H264_4 = 3'd3,  // two H.264 4-point transforms
    MODE_VC1_4  = 3'd4   // two VC-1 4-point transforms
  } mode_e;

  // Coefficient magnitudes; index k holds Ck (index 0 unused).
  typedef logic [CW-1:0] coef_t;
  typedef coef_t coef_set_t [8];

  function automatic logic is_four_point(mode_e m);
    return (m == MODE_H264_4) || (m == MODE_VC1_4);
  endfunction

  // Ck magnitudes per standard.
  //  MPEG : round(256 * cos(k*pi/16) / 2)
  //  H.264 8-point : 8 12 8 10 8 6 4 3  (C4 C1 C2 C3 ...)
  //  VC-1 8-point  : C4=12 C1=16 C2=16 C3=15 C5=9 C6=6 C7=4
  //  H.264 4-point : C4=1 C2=2 C6=1 ; VC-1 4-point : C4=17 C2=22 C6=10
  function automatic coef_t coef(mode_e m, int unsigned k);
    coef_t c;
    c = '0;
    unique case (m)
      MODE_MPEG8: case (k)
        1: c = 7'd126; 2: c = 7'd118; 3: c = 7'd106; 4: c = 7'd91;
        5: c = 7'd71;  6: c = 7'd49;  7: c = 7'd25;  default: c = '0;
      endcase
      MODE_H264_8: case (k)
        1: c = 7'd12; 2: c = 7'd8; 3: c = 7'd10; 4: c = 7'd8;
        5: c = 7'd6;  6: c = 7'd4; 7: c = 7'd3;  default: c = '0;
      endcase
      MODE_VC1_8: case (k)
        1: c = 7'd16; 2: c = 7'd16; 3: c = 7'd15; 4: c = 7'd12;
        5: c = 7'd9;  6: c = 7'd6;  7: c = 7'd4;  default: c = '0;
      endcase
      MODE_H264_4: case (k)
        2: c = 7'd2; 4: c = 7'd1; 6: c = 7'd1; default: c = '0;
      endcase
      MODE_VC1_4: case (k)
        2: c = 7'd22; 4: c = 7'd17; 6: c = 7'd10; default: c = '0;
      endcase
      default: c = '0;
    endcase
    return c;
  endfunction

  // Output scaling: result = round(sum / 2^shift).
  function automatic logic [3:0] out_shift(mode_e m);
    unique case (m)
      MODE_MPEG8:  return 4'd8;
      MODE_H264_8: return 4'd5;
      MODE_VC1_8:  return 4'd5;
      MODE_H264_4: return 4'd1;
      MODE_VC1_4:  return 4'd5;
      default:     return 4'd5;
    endcase
  endfunction

  // Signed coefficient of the odd part, row r (0..3), column j (0..3).
  // 8-point modes use the odd matrix, 4-point modes reuse the even
  // (4-point) matrix for the second 4-point transform.
  function automatic int odd_index(logic four, logic [1:0] r, logic [1:0] j);
    // returns +/- k for coefficient +/-Ck
    int t8 [4][4];
    int t4 [4][4];
    t8 = '{'{1, 3, 5, 7}, '{3, -7, -1, -5}, '{5, -1, 7, 3}, '{7, -5, 3, -1}};
    t4 = '{'{4, 4, 4, 4}, '{2, 6, -6, -2}, '{4, -4, -4, 4}, '{6, -2, 2, -6}};
    return four ? t4[r][j] : t8[r][j];
  endfunction

endpackage
