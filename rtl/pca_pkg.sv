// pca_pkg: shared sizes and fixed-point formats of the block-streaming PCA
// accelerator.
//
// The accelerator reduces an R x B data matrix (R pixels, B spectral bands)
// to R x L principal-component scores. All arithmetic is fixed point. The
// default geometry (12 bands of 8-bit pixels, blocks of 4 bands) is the
// fixed-point hyperspectral configuration of the design; the word lengths
// below are this implementation's own choice, sized so that no intermediate
// value can overflow for up to 2^R_W pixels.
//
//   pixel       DW bits, unsigned integer
//   mean        MEAN_W bits, unsigned, MF fraction bits
//   centred     CEN_W bits, signed, MF fraction bits   (x - mean)
//   cov accum   ACC_W bits, signed, 2*MF fraction bits (sum of products)
//   cov / H     H_W bits, signed, HF = 2*MF fraction bits
//   rotation    ROT_W bits, signed, RF fraction bits (t, cs, sn, V, PCs)
//   output Y    Y_W bits, signed, YF fraction bits
package pca_pkg;

  localparam int DW     = 8;             // input sample width
  localparam int MF     = 8;             // mean / centred fraction bits
  localparam int MEAN_W = DW + MF;       // unsigned mean
  localparam int CEN_W  = DW + MF + 1;   // signed centred sample
  localparam int R_W    = 20;            // row counter width (up to 2^20-1 pixels)
  localparam int PROD_W = 2 * CEN_W;     // centred x centred product
  localparam int ACC_W  = PROD_W + R_W;  // covariance accumulator
  localparam int HF     = 2 * MF;        // covariance fraction bits
  localparam int H_W    = 40;            // covariance / EVD matrix element
  localparam int RF     = 30;            // rotation and eigenvector fraction bits
  localparam int ROT_W  = 32;            // rotation and eigenvector word
  localparam int YF     = 16;            // projection output fraction bits
  localparam int Y_W    = 32;            // projection output word
  localparam int ADDR_W = 32;            // external memory word address

  typedef logic signed [CEN_W-1:0] cen_t;
  typedef logic        [MEAN_W-1:0] mean_t;
  typedef logic signed [H_W-1:0]   h_t;
  typedef logic signed [ROT_W-1:0] rot_t;
  typedef logic signed [Y_W-1:0]   y_t;

  // Phases of the dispatcher; also used by the top-level sequencing.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_MEAN = 2'd1,
    PH_COV  = 2'd2,
    PH_PROJ = 2'd3
  } phase_e;

endpackage
