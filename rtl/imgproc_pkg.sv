// imgproc_pkg: types and constants shared by the image processing platform.
//
// A pixel occupies one 32-bit DDR2 word: blue in bits [7:0], green in [15:8],
// red in [23:16] and an unused padding byte in [31:24]. The host inserts the
// padding byte after every three BMP bytes, so four pixels fill the 128 bits
// moved by one DDR2 burst. Pixel k of a 128-bit word is bits [32k+31:32k].
// The DDR2 is split into an image area starting at address 0 and a data area
// (the GLCM matrix, per-line results) starting at address 2**24, both in
// 32-bit word addresses of a 25-bit address space.
package imgproc_pkg;

  typedef struct packed {
    logic [7:0] pad;
    logic [7:0] red;
    logic [7:0] green;
    logic [7:0] blue;
  } pixel_t;

  typedef pixel_t [3:0] word4_t;   // one 128-bit DDR2 burst

  localparam int unsigned DDR_AW      = 25;
  localparam int unsigned DATA_BASE   = 32'd16777216;  // 2**24

  // MIG user command codes. Init (010) is the code the DDR2 interface uses
  // for initialisation; write and read follow the same interface convention.
  typedef enum logic [2:0] {
    MIG_NOP   = 3'b000,
    MIG_INIT  = 3'b010,
    MIG_WRITE = 3'b100,
    MIG_READ  = 3'b110
  } mig_cmd_e;

  typedef enum logic [1:0] {
    CH_RED,
    CH_GREEN,
    CH_BLUE
  } channel_e;

  // Algorithms the platform can run on a received image.
  typedef enum logic [3:0] {
    ALG_RED_CHANNEL,
    ALG_GREEN_CHANNEL,
    ALG_NEGATIVE,
    ALG_BRIGHT_CONTRAST,
    ALG_SIMPLE_GRAY,
    ALG_WEIGHTED_GRAY,
    ALG_BINARIZATION,
    ALG_FOUR_GRAY,
    ALG_FOUR_GRAY_REG,
    ALG_HPROJ,
    ALG_GLCM
  } alg_e;

endpackage
