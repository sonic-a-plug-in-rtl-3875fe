// sonic_pkg: types and constants shared by the SONIC PIPE, its router and the local bus
// controller.
//
// Pixels are 32-bit RGBa words, one per PIPE Memory location: R in [31:24], G in [23:16],
// B in [15:8], alpha in [7:0]. The PIPEFlow bus carries 16 data bits and 3 control bits per
// beat; a pixel takes two beats, RG first and then Ba. The 16+3 bit width, the RG/Ba time
// multiplexing, the 32-bit multiplexed PIPE bus with 4 control signals and the 1M x 32 PIPE
// Memory follow the SONIC paper. The meaning of the three PIPEFlow control bits, the four
// PIPE bus control signals, the register map and the route/scan encodings are this design's
// own choices.
package sonic_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned PM_AW      = 20;   // 1M words of PIPE Memory
  localparam int unsigned PIX_W      = 32;   // RGBa, 8 bits each
  localparam int unsigned PF_DW      = 16;   // PIPEFlow data bits
  localparam int unsigned PF_CW      = 3;    // PIPEFlow control bits
  localparam int unsigned DIM_W      = 11;   // image width/height, 1..1024
  localparam int unsigned NPIPES_MAX = 8;

  // ---------------------------------------------------------------- PIPEFlow beat
  // ctrl[0] valid : the beat carries data
  // ctrl[1] phase : 0 = first beat {R,G}, 1 = second beat {B,a}
  // ctrl[2] mark  : on the first beat, start of a scan line; on the second beat, last
  //                 pixel of the image
  typedef struct packed {
    logic [PF_CW-1:0] ctrl;
    logic [PF_DW-1:0] data;
  } pf_beat_t;

  localparam pf_beat_t PF_IDLE = '0;

  // Pixel with its position flags, as the router moves it internally.
  typedef struct packed {
    logic             sol;   // first pixel of a scan line (segment)
    logic             eof;   // last pixel of the image
    logic [PIX_W-1:0] pix;
  } pix_t;

  // ---------------------------------------------------------------- PIPE bus
  // 32-bit multiplexed address/data plus four control signals:
  //   AS  address strobe: AD carries an address this cycle
  //   WR  direction of the transfer that AS opens (1 = write)
  //   DS  data strobe: the master offers a data beat (write data on AD, or a read request)
  //   RDY from the selected slave: the beat is accepted this cycle; read data follows on the
  //       slave's AD one cycle later. Addresses auto-increment after each accepted beat.
  typedef struct packed {
    logic [31:0] ad;
    logic        as;
    logic        wr;
    logic        ds;
  } pb_m_t;

  // Per-PIPE unique select lines (Fig 6: PE Select, PR Select, PM Select).
  typedef enum logic [1:0] {
    SPACE_PR = 2'd0,
    SPACE_PM = 2'd1,
    SPACE_PE = 2'd2,
    SPACE_NONE = 2'd3
  } space_e;

  // ---------------------------------------------------------------- PR registers
  localparam logic [3:0] PR_REG_WIDTH   = 4'd0;  // image width in pixels
  localparam logic [3:0] PR_REG_HEIGHT  = 4'd1;  // image height in pixels
  localparam logic [3:0] PR_REG_ROUTE   = 4'd2;  // [1:0] source, [3:2] destination
  localparam logic [3:0] PR_REG_MODE    = 4'd3;  // [1:0] scan mode, [4] RGB->HSV for the PE
  localparam logic [3:0] PR_REG_FLOW    = 4'd4;  // write: bit0 PROCESS; read: bit0 done, bit1 busy
  localparam logic [3:0] PR_REG_STRIP   = 4'd5;  // strip size for the stripped modes
  localparam logic [3:0] PR_REG_SRCBASE = 4'd6;  // PM word address of the source image
  localparam logic [3:0] PR_REG_DSTBASE = 4'd7;  // PM word address of the result image
  localparam logic [3:0] PR_REG_PMOWN   = 4'd8;  // bit0: the PE has direct access to the PM
  localparam logic [3:0] PR_REG_COUNT   = 4'd9;  // read only: pixels delivered so far

  typedef enum logic [1:0] {
    SRC_NONE  = 2'd0,
    SRC_PM    = 2'd1,
    SRC_LEFT  = 2'd2,
    SRC_START = 2'd3
  } src_e;

  typedef enum logic [1:0] {
    DST_NONE  = 2'd0,
    DST_PM    = 2'd1,
    DST_RIGHT = 2'd2,
    DST_END   = 2'd3
  } dst_e;

  typedef enum logic [1:0] {
    SCAN_H  = 2'd0,   // normal horizontal raster
    SCAN_V  = 2'd1,   // normal vertical raster
    SCAN_HS = 2'd2,   // horizontal 'stripped'
    SCAN_VS = 2'd3    // vertical 'stripped'
  } scan_e;

  // ---------------------------------------------------------------- host address map (LBC)
  // host word address: [25:23] PIPE number, [22:21] space (PR/PM/PE), [19:0] offset
  localparam int unsigned HA_W = 26;

endpackage
