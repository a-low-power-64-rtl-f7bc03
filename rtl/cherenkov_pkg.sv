// cherenkov_pkg: types and constants shared by the readout channel of the
// 64-channel SiPM readout ASIC.
//
// Each channel stores the amplified sensor signal in 256 analog memory cells,
// grouped in 8 sections of 32 cells, and digitises them with a Wilkinson ADC
// whose time base is a per-channel Gray counter of 8 to 12 bits.  The sizes
// (64 channels, 256 cells, 32-cell sections, 12-bit maximum resolution, groups
// of 8 channels for readout) and the five cell states follow the original design
// description; the numeric encodings below are this design's choice.
package cherenkov_pkg;

  localparam int unsigned DATA_W    = 12;   // maximum ADC resolution
  localparam int unsigned MIN_RES   = 8;    // minimum ADC resolution
  localparam int unsigned N_CELLS   = 256;  // memory cells per channel
  localparam int unsigned SEC_CELLS = 32;   // cells per section
  localparam int unsigned N_SEC     = N_CELLS / SEC_CELLS;  // 8 sections
  localparam int unsigned N_CH      = 64;   // channels per ASIC
  localparam int unsigned GROUP_CH  = 8;    // channels per readout group

  // The five states a section goes through.
  typedef enum logic [2:0] {
    ST_IDLE       = 3'd0,
    ST_SAMPLING   = 3'd1,
    ST_WARMUP     = 3'd2,
    ST_DIGITIZING = 3'd3,
    ST_READING    = 3'd4
  } sec_state_t;

  // Segmentation: how many cells form one independent circular buffer.
  typedef enum logic [1:0] {
    SEG_32  = 2'd0,
    SEG_64  = 2'd1,
    SEG_256 = 2'd2
  } seg_mode_t;

  // Sparse: every channel acquires on its own trigger.
  // Imaging: every channel acquires on a common trigger.
  typedef enum logic {
    MODE_SPARSE  = 1'b0,
    MODE_IMAGING = 1'b1
  } acq_mode_t;

  // Static configuration, written while the ASIC is held in reset.
  typedef struct packed {
    acq_mode_t  mode;        // sparse or imaging
    seg_mode_t  seg;         // 32, 64 or 256 cells per segment
    logic [3:0] res_bits;    // ADC resolution, 8..12 (clamped)
    logic       ext_trig_en; // 1: external trigger, 0: internal (comparators)
    logic [7:0] post_trig;   // cells sampled after the trigger
  } cfg_t;

  // Segment length in cells and number of segments for a segmentation.
  function automatic int unsigned seg_len(seg_mode_t s);
    case (s)
      SEG_64:  return 64;
      SEG_256: return 256;
      default: return 32;
    endcase
  endfunction

  function automatic int unsigned seg_count(seg_mode_t s);
    return N_CELLS / seg_len(s);
  endfunction

  function automatic logic [DATA_W-1:0] bin2gray(logic [DATA_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [DATA_W-1:0] gray2bin(logic [DATA_W-1:0] g);
    logic [DATA_W-1:0] b;
    b[DATA_W-1] = g[DATA_W-1];
    for (int i = DATA_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Resolution clamped to the supported 8..12 bit range.
  function automatic logic [3:0] clamp_res(logic [3:0] r);
    if (r < 4'(MIN_RES)) return 4'(MIN_RES);
    if (r > 4'(DATA_W))  return 4'(DATA_W);
    return r;
  endfunction

endpackage
