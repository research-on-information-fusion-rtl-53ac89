// regist_pkg: types and constants shared by the depth-to-color image
// registration pipeline.
//
// All real-valued quantities of the registration (focal lengths, principal
// points, rotation and translation entries, 3-D coordinates) are carried as
// signed Q16.16 fixed point (32 bits, 16 fraction bits).  The depth scale,
// which is a small number (about 0.001 metre per depth unit on the depth
// camera used with this design), is an unsigned Q0.32 fraction so that it
// keeps enough precision.  The reference algorithm computes in single
// precision floating point; the fixed-point formats are this design's own
// choice.  The image size, 640 x 480, is the one the algorithm is written
// for.
package regist_pkg;

  localparam int unsigned FRAC      = 16;        // fraction bits of fix_t
  localparam int unsigned FIX_W     = 32;        // width of fix_t
  localparam int unsigned DEPTH_W   = 16;        // raw depth sample width
  localparam int unsigned IMG_W_DEF = 640;       // image width  (pixels)
  localparam int unsigned IMG_H_DEF = 480;       // image height (pixels)

  typedef logic signed [FIX_W-1:0] fix_t;        // Q16.16
  typedef logic        [31:0]      scale_t;      // unsigned Q0.32
  typedef logic signed [63:0]      wide_t;       // Q32.32 product

  // Pinhole intrinsics, in the element order of the host's array:
  // [0] fx, [1] fy, [2] px, [3] py.
  typedef struct packed {
    fix_t fx;
    fix_t fy;
    fix_t px;
    fix_t py;
  } intrinsics_t;

  // Depth-to-color extrinsics, row major: r11 r12 r13 t1 r21 r22 r23 t2
  // r31 r32 r33 t3.  Element k of the host array is e[k].
  typedef fix_t extrinsics_t [12];

  // Everything the pipeline needs for one frame.
  typedef struct packed {
    intrinsics_t color;
    intrinsics_t depth;
    fix_t [11:0] extr;     // extr[k] is host array element k
    scale_t      depth_scale;
  } cam_params_t;

  // Register map of the host interface (byte addresses, 32-bit words).
  localparam logic [7:0] REG_CTRL    = 8'h00;  // W: bit0 start. R: bit0 busy, bit1 done
  localparam logic [7:0] REG_WRITTEN = 8'h04;  // R: pixels written in last frame
  localparam logic [7:0] REG_DROPPED = 8'h08;  // R: pixels dropped (off image / invalid)
  localparam logic [7:0] REG_INTR_C  = 8'h10;  // 0x10..0x1C color fx, fy, px, py
  localparam logic [7:0] REG_INTR_D  = 8'h20;  // 0x20..0x2C depth fx, fy, px, py
  localparam logic [7:0] REG_EXTR    = 8'h30;  // 0x30..0x5C extrinsics[0..11]
  localparam logic [7:0] REG_SCALE   = 8'h60;  // depth scale, Q0.32

endpackage
