// hptdc_pkg: types and constants shared by the data driven TDC.
//
// A time measurement is {bunch count, bin}: the bunch count is the coarse time
// in 25 ns clock periods, and the 8 bit bin divides a period into 256 bins of
// about 98 ps. The DLL and its counter run at 40, 160 or 320 MHz (setup field
// resolution): the bin is then {DLL tap, 000}, {DLL period in bunch[1:0], tap, 0}
// or {DLL period in bunch[2:0], tap}, i.e. bins of 781, 195 or 98 ps. The channel count (32 in 4 groups of 8),
// the 32 DLL taps, the 4 deep channel buffers, the 256 deep latency and readout
// buffers and the 16 deep trigger FIFO follow the document. Field widths, word
// formats and the configuration layout are this design's own choices.
package hptdc_pkg;

  localparam int unsigned N_GROUPS      = 4;
  localparam int unsigned CH_PER_GROUP  = 8;
  localparam int unsigned N_CHANNELS    = N_GROUPS * CH_PER_GROUP;
  localparam int unsigned DLL_TAPS      = 32;
  localparam int unsigned FINE_W        = 5;     // log2(DLL_TAPS)
  localparam int unsigned COARSE_W      = 12;    // covers one LHC orbit (3564 bunches)
  localparam int unsigned SUB_W         = 3;     // DLL periods per bunch period, up to 8
  localparam int unsigned BIN_W         = SUB_W + FINE_W;
  localparam int unsigned CNT_W         = COARSE_W + SUB_W;  // counter seen by the front ends
  localparam int unsigned TIME_W        = COARSE_W + BIN_W;
  localparam int unsigned WIDTH_W       = 7;     // pair mode pulse width
  localparam int unsigned CHAN_W        = 3;     // channel inside a group
  localparam int unsigned EVID_W        = 12;
  // cycles the matcher waits after a window has closed, so that hits still in
  // the channel buffers and the arbiter reach the latency buffer
  localparam int unsigned MATCH_MARGIN  = 8;

  typedef enum logic [1:0] {
    EDGE_LEADING  = 2'd0,
    EDGE_TRAILING = 2'd1,
    EDGE_BOTH     = 2'd2,
    EDGE_PAIR     = 2'd3
  } edge_mode_e;

  // DLL / counter clock: 40 MHz (781 ps bins), 160 MHz (195 ps), 320 MHz (98 ps)
  typedef enum logic [1:0] {
    RES_40MHZ  = 2'd0,
    RES_160MHZ = 2'd1,
    RES_320MHZ = 2'd2
  } res_mode_e;

  typedef enum logic [1:0] {
    RO_PARALLEL = 2'd0,
    RO_BYTE     = 2'd1,
    RO_SERIAL   = 2'd2,
    RO_JTAG     = 2'd3
  } ro_mode_e;

  // one measurement as it travels from a channel to the readout
  typedef struct packed {
    logic               pair;     // pair word: time is the leading edge, width is valid
    logic               leading;  // leading (1) or trailing (0) edge
    logic [CHAN_W-1:0]  chan;     // channel inside the group
    logic [TIME_W-1:0]  time_m;   // {bunch count, bin}
    logic [WIDTH_W-1:0] width;    // pair mode: trailing - leading in bins, saturated
  } hit_t;

  localparam int unsigned HIT_W = $bits(hit_t);

  // 32 bit readout words: [31:28] type, [27:25] TDC id
  localparam logic [3:0] W_OCCUPANCY = 4'h1; // [27:0] 4 x 7 bit latency buffer occupancy / 4, group 0 at [6:0]
  localparam logic [3:0] W_HEADER   = 4'h2;  // [23:12] event id, [11:0] bunch id
  localparam logic [3:0] W_TRAILER  = 4'h3;  // [23:12] event id, [11:0] word count
  localparam logic [3:0] W_LEADING  = 4'h4;  // [24:20] channel, [19:0] time
  localparam logic [3:0] W_TRAILING = 4'h5;  // [24:20] channel, [19:0] time
  localparam logic [3:0] W_PAIR     = 4'h6;  // [24:20] channel, [18:12] width, [11:0] leading bunch
  localparam logic [3:0] W_ERROR    = 4'h7;  // [6:0] error flags

  // error flag bits carried in the error word
  localparam int unsigned ERR_CHAN_LOST   = 0;  // a hit found its channel buffer full
  localparam int unsigned ERR_LAT_OVF     = 1;  // a latency buffer overflowed
  localparam int unsigned ERR_MAX_HITS    = 2;  // hits beyond the per-event limit dropped
  localparam int unsigned ERR_TRIG_LOST   = 3;  // trigger FIFO was full
  localparam int unsigned ERR_PARITY      = 4;  // memory parity error
  localparam int unsigned ERR_FSM         = 5;  // illegal one-hot state
  localparam int unsigned ERR_SETUP       = 6;  // setup parity error
  localparam int unsigned N_ERR           = 7;

  // programming data, loaded through JTAG
  typedef struct packed {
    logic [N_CHANNELS-1:0][7:0] chan_offset;   // added to every time, in bins
    res_mode_e           resolution;
    logic [2:0]          tdc_id;
    logic                token_enable;         // take part in token passing
    logic                enable_trailer;
    logic                enable_header;
    logic                enable_error_word;
    logic                enable_occupancy;
    logic [2:0]          serial_div;           // serial bit period = 2**serial_div cycles
    ro_mode_e            readout_mode;
    logic [7:0]          rofifo_size;          // readout FIFO holds rofifo_size+1 words
    logic [7:0]          max_hits;             // hits per event, 0 = no limit
    logic [COARSE_W-1:0] reject_latency;
    logic [COARSE_W-1:0] match_window;
    logic [COARSE_W-1:0] trigger_latency;
    logic [COARSE_W-1:0] count_offset;         // counter value after a bunch reset
    logic [COARSE_W-1:0] roll_over;            // last counter value
    logic [2:0]          dead_time;            // cycles a channel stays blind after a hit
    logic [N_CHANNELS-1:0] chan_enable;
    edge_mode_e          edge_mode;
    logic                enable_matching;
  } cfg_t;

  localparam int unsigned CFG_W = $bits(cfg_t);

  // setup after a JTAG reset: all channels on, leading edges, trigger matching
  // with a latency of 200 and a window of 20 bunch periods, one LHC orbit
  localparam cfg_t CFG_DEFAULT = '{
    chan_offset:     '0,
    resolution:      RES_40MHZ,
    tdc_id:          3'd0,
    token_enable:    1'b0,
    enable_trailer:  1'b1,
    enable_header:   1'b1,
    enable_error_word: 1'b1,
    enable_occupancy:  1'b0,
    serial_div:      3'd0,
    readout_mode:    RO_PARALLEL,
    rofifo_size:     8'd255,
    max_hits:        8'd0,
    reject_latency:  COARSE_W'(240),
    match_window:    COARSE_W'(20),
    trigger_latency: COARSE_W'(200),
    count_offset:    '0,
    roll_over:       COARSE_W'(3563),
    dead_time:       3'd0,
    chan_enable:     '1,
    edge_mode:       EDGE_LEADING,
    enable_matching: 1'b1
  };

  // one accepted trigger
  typedef struct packed {
    logic [EVID_W-1:0]   event_id;
    logic [COARSE_W-1:0] bunch_id;   // coarse count when the trigger arrived
    logic [COARSE_W-1:0] tag;        // start of the matching window
  } trig_t;

  // bunch count of a time
  function automatic logic [COARSE_W-1:0] bunch_of(logic [TIME_W-1:0] t);
    return t[TIME_W-1:BIN_W];
  endfunction

  // last DLL period number inside a bunch period for a resolution setting
  function automatic logic [SUB_W-1:0] sub_max(res_mode_e r);
    unique case (r)
      RES_160MHZ: return SUB_W'(3);
      RES_320MHZ: return SUB_W'(7);
      default:    return SUB_W'(0);
    endcase
  endfunction

  // modular distance a - b on a counter that wraps after roll_over
  function automatic logic [COARSE_W-1:0] coarse_diff(logic [COARSE_W-1:0] a,
                                                      logic [COARSE_W-1:0] b,
                                                      logic [COARSE_W-1:0] roll_over);
    logic [COARSE_W:0] d;
    d = {1'b0, a} - {1'b0, b};
    if (a < b) d = d + {1'b0, roll_over} + 1'b1;
    return d[COARSE_W-1:0];
  endfunction

endpackage
