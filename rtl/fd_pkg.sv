// fd_pkg: sizes, types and the sub-window command set shared by the face
// detector. Image geometry (320x240, 12-bit RGB, 8-bit gray), the 21-bit
// integral-image word, the 29-bit squared-integral word and the 16 parallel
// sub-windows follow the published design. The 24x24 window, the strip
// organisation of the integral buffers and the command encoding are this
// design's own choices (see README).
package fd_pkg;

  // ---- image ---------------------------------------------------------------
  localparam int unsigned IMG_W   = 320;
  localparam int unsigned IMG_H   = 240;
  localparam int unsigned PIX_W   = 12;               // RGB444
  localparam int unsigned GRAY_W  = 8;
  localparam int unsigned IMG_AW  = $clog2(IMG_W * IMG_H);  // 17

  // ---- detection window / integral strip -----------------------------------
  localparam int unsigned WIN     = 24;               // window edge, pixels
  localparam int unsigned NUM_SW  = 16;               // sub-windows in parallel
  localparam int unsigned CHUNK   = 2 * NUM_SW;       // words per port-B read
  localparam int unsigned II_W    = 21;               // integral image word
  localparam int unsigned IIX2_W  = 29;               // squared integral word
  localparam int unsigned WIN_AREA = WIN * WIN;       // 576

  // ---- Haar cascade storage -------------------------------------------------
  localparam int unsigned MAX_RECTS = 3;              // rectangles per feature
  localparam int unsigned CMP_W     = 44;             // signed comparator width
  localparam int unsigned THR_FRAC  = 12;             // weak thresholds in Q4.12
  localparam int unsigned NUM_STAGES = 3;             // stages in classifier_rom
  localparam int unsigned NUM_FEATS  = 4;             // features in classifier_rom

  typedef struct packed {
    logic [4:0]        x;        // left column inside the window
    logic [4:0]        y;        // top row inside the window
    logic [4:0]        w;        // width  (x + w <= WIN)
    logic [4:0]        h;        // height (y + h <= WIN)
    logic signed [3:0] weight;   // rectangle weight
  } rect_t;

  typedef struct packed {
    rect_t [MAX_RECTS-1:0] rect;
    logic [1:0]            nrect;   // rectangles used (2 or 3)
    logic signed [15:0]    thr;     // weak threshold, Q4.12, scaled by std dev
    logic signed [15:0]    left;    // vote when feature value < threshold
    logic signed [15:0]    right;   // vote otherwise
  } feature_t;

  typedef struct packed {
    logic [7:0]         first;      // index of the stage's first feature
    logic [7:0]         nfeat;      // number of features in the stage
    logic signed [15:0] thr;        // strong (stage) threshold
  } stage_t;

  // ---- command broadcast from the sequencer to every sub-window -------------
  typedef enum logic [2:0] {
    OP_NOP      = 3'd0,
    OP_START    = 3'd1,  // new window group: clear, load valid flag
    OP_VAR      = 3'd2,  // add (+/-) one corner of sum and sum of squares
    OP_VAR_DONE = 3'd3,  // compute variance, start square root
    OP_CORNER   = 3'd4,  // add (+/-) weight * corner of a feature rectangle
    OP_FEAT     = 3'd5,  // weak classifier decision, add vote to stage sum
    OP_STAGE    = 3'd6   // strong classifier decision, may reject window
  } sw_op_e;

  typedef struct packed {
    sw_op_e             op;
    logic               neg;       // corner enters with minus sign
    logic signed [3:0]  weight;    // rectangle weight for OP_CORNER
    logic signed [15:0] thr;       // weak threshold (OP_FEAT) or stage threshold (OP_STAGE)
    logic signed [15:0] left;
    logic signed [15:0] right;
  } sw_ctrl_t;

endpackage
