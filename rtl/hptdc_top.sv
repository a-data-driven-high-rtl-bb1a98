// hptdc_top: data driven multi-channel time to digital converter.
//
// 32 channels in 4 groups of 8. A time measurement is the state of a clock
// synchronous coarse counter and of a 32 tap DLL, latched at a hit edge by a full
// custom front end outside this RTL: the hit_* inputs carry, per channel, a one
// cycle strobe with the latched DLL taps and the two counter copies, which the
// front ends take from count_a/count_b. Each channel buffers its measurements
// in a 4 deep derandomizer; a fair arbiter merges the 8 channels of a group into
// a 256 deep latency buffer at one word per clock. Triggers become time tags in
// a 16 deep trigger FIFO; the trigger matcher collects, per trigger, the hits of
// all 4 latency buffers inside the matching window (overlapping triggers
// allowed), frames them with header, error and trailer words and writes them to
// a 256 deep readout FIFO; without trigger matching it streams all hits. The
// readout interface sends words as 32 bit, 8 bit or serial data, or through
// JTAG, sharing the bus with other chips by token passing. All settings come from a JTAG loaded setup
// register with one common parity bit; memories carry parity and state machines
// are one-hot, and any of these faults is reported on error and in the event
// data. Status (error flags, trigger, readout, latency and channel buffer
// occupancies, in that order from bit 0) is readable through JTAG.
// The coarse counter runs on clk_dll, the DLL clock at 1, 4 or 8 times the
// 40 MHz logic clock (setup field resolution: about 781, 195 or 98 ps bins);
// clk_dll must be phase locked to clk with rising edges together; the counter
// keeps its bunch boundaries on clk edges. For the 40 MHz setting clk_dll may
// be clk itself. Times are in 98 ps units at every setting. Everything else
// runs on clk, except the JTAG port on tck. The architecture follows the
// document; the sizes of fields, word formats and handshakes are this design's.
module hptdc_top
  import hptdc_pkg::*;
(
  input  logic                clk,
  input  logic                clk_dll,
  input  logic                rst_n,
  input  logic                bunch_reset,
  input  logic                event_reset,
  input  logic                trigger,
  // coarse counter to the channel front ends
  output logic [CNT_W-1:0]    count_a,
  output logic [CNT_W-1:0]    count_b,
  // hits as latched by the channel front ends
  input  logic [N_CHANNELS-1:0]                hit_stb,
  input  logic [N_CHANNELS-1:0]                hit_leading,
  input  logic [N_CHANNELS-1:0][DLL_TAPS-1:0]  hit_taps,
  input  logic [N_CHANNELS-1:0][CNT_W-1:0]     hit_cnt_a,
  input  logic [N_CHANNELS-1:0][CNT_W-1:0]     hit_cnt_b,
  // readout
  output logic [31:0]         data_out,
  output logic                data_ready,
  input  logic                get_data,
  output logic                serial_out,
  output logic                serial_strobe,
  input  logic                token_in,
  output logic                token_out,
  output logic                error,
  // JTAG
  input  logic                tck,
  input  logic                trst_n,
  input  logic                tms,
  input  logic                tdi,
  output logic                tdo
);
  localparam int unsigned LAT_DEPTH = 256;
  localparam int unsigned RO_DEPTH  = 256;
  localparam int unsigned TRIG_DEPTH = 16;
  localparam int unsigned LAW = $clog2(LAT_DEPTH);
  localparam int unsigned CHAN_DEPTH = 4;
  localparam int unsigned STATUS_W = N_ERR + ($clog2(TRIG_DEPTH) + 1)
                                   + ($clog2(RO_DEPTH) + 1) + N_GROUPS * (LAW + 1)
                                   + N_CHANNELS * ($clog2(CHAN_DEPTH) + 1);

  cfg_t cfg;
  logic setup_err;
  logic [COARSE_W-1:0] bunch;

  // groups
  logic [N_GROUPS-1:0]        g_pop, g_lost, g_ovf, g_perr;
  logic [N_GROUPS-1:0][LAW-1:0] g_head;
  logic [N_GROUPS-1:0][LAW:0] g_count;
  logic [N_GROUPS-1:0][CH_PER_GROUP-1:0][$clog2(CHAN_DEPTH):0] g_chan_occ;
  hit_t [N_GROUPS-1:0]        g_head_data, g_rd_data;
  logic [LAW-1:0]             rd_addr;

  // trigger
  trig_t                      trig;
  logic                       trig_empty, trig_pop, trig_lost, trig_perr;
  logic [$clog2(TRIG_DEPTH):0] trig_occ;

  // readout
  logic                       ro_wr, ro_full, ro_rd, ro_empty, ro_perr;
  logic [31:0]                ro_wdata, ro_rdata;
  logic [$clog2(RO_DEPTH):0]  ro_occ;
  logic                       match_fsm_err, ro_fsm_err;
  logic [N_ERR-1:0]           err_in, err_pending;
  logic [STATUS_W-1:0]        status;
  logic [31:0]                jtag_ro_word;
  logic                       jtag_ro_offer, jtag_ro_ack;

  coarse_counter u_counter (
    .clk, .clk_dll, .rst_n, .bunch_reset, .resolution(cfg.resolution),
    .roll_over(cfg.roll_over), .count_offset(cfg.count_offset),
    .count_a, .count_b, .bunch
  );

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_grp
    localparam int unsigned B = g * CH_PER_GROUP;
    tdc_group #(.LAT_DEPTH(LAT_DEPTH), .CHAN_DEPTH(CHAN_DEPTH)) u_group (
      .clk, .rst_n,
      .chan_enable (cfg.chan_enable[B +: CH_PER_GROUP]),
      .edge_mode   (cfg.edge_mode),
      .dead_time   (cfg.dead_time),
      .resolution  (cfg.resolution),
      .roll_over   (cfg.roll_over),
      .chan_offset (cfg.chan_offset[B +: CH_PER_GROUP]),
      .hit_stb     (hit_stb[B +: CH_PER_GROUP]),
      .hit_leading (hit_leading[B +: CH_PER_GROUP]),
      .hit_taps    (hit_taps[B +: CH_PER_GROUP]),
      .hit_cnt_a   (hit_cnt_a[B +: CH_PER_GROUP]),
      .hit_cnt_b   (hit_cnt_b[B +: CH_PER_GROUP]),
      .pop(g_pop[g]), .head(g_head[g]), .count(g_count[g]),
      .head_data(g_head_data[g]), .rd_addr, .rd_data(g_rd_data[g]),
      .chan_occ(g_chan_occ[g]), .chan_lost(g_lost[g]), .lat_overflow(g_ovf[g]), .parity_err(g_perr[g])
    );
  end

  trigger_unit #(.DEPTH(TRIG_DEPTH)) u_trigger (
    .clk, .rst_n, .trigger, .event_reset,
    .count(bunch), .roll_over(cfg.roll_over), .trigger_latency(cfg.trigger_latency),
    .pop(trig_pop), .trig, .empty(trig_empty), .trig_lost,
    .parity_err(trig_perr), .occupancy(trig_occ)
  );

  always_comb begin
    err_in                 = '0;
    err_in[ERR_CHAN_LOST]  = |g_lost;
    err_in[ERR_LAT_OVF]    = |g_ovf;
    err_in[ERR_TRIG_LOST]  = trig_lost;
    err_in[ERR_PARITY]     = (|g_perr) || (trig_perr && !trig_empty) || ro_perr;
    err_in[ERR_FSM]        = match_fsm_err || ro_fsm_err;
    err_in[ERR_SETUP]      = setup_err;
  end

  trigger_matching #(.LAT_DEPTH(LAT_DEPTH)) u_match (
    .clk, .rst_n, .cfg, .now(bunch),
    .trig, .trig_empty, .trig_pop,
    .lb_count(g_count), .lb_head_data(g_head_data), .lb_head(g_head),
    .lb_rd_data(g_rd_data), .lb_rd_addr(rd_addr), .lb_pop(g_pop),
    .err_in, .ro_wr, .ro_data(ro_wdata), .ro_full,
    .fsm_err(match_fsm_err), .err_pending
  );

  readout_fifo #(.DEPTH(RO_DEPTH)) u_rofifo (
    .clk, .rst_n, .size(cfg.rofifo_size),
    .wr_en(ro_wr), .wr_data(ro_wdata), .full(ro_full),
    .rd_en(ro_rd), .rd_data(ro_rdata), .empty(ro_empty),
    .parity_err(ro_perr), .occupancy(ro_occ)
  );

  readout_interface u_readout (
    .clk, .rst_n, .mode(cfg.readout_mode), .serial_div(cfg.serial_div),
    .token_enable(cfg.token_enable),
    .fifo_data(ro_rdata), .fifo_empty(ro_empty), .fifo_rd(ro_rd),
    .data_out, .data_ready, .get_data, .serial_out, .serial_strobe,
    .token_in, .token_out,
    .jtag_word(jtag_ro_word), .jtag_offer(jtag_ro_offer), .jtag_ack(jtag_ro_ack),
    .fsm_err(ro_fsm_err)
  );

  assign status = {g_chan_occ, g_count, ro_occ, trig_occ, err_pending};
  assign error  = |err_pending;

  jtag_tap #(.STATUS_W(STATUS_W)) u_jtag (
    .tck, .trst_n, .tms, .tdi, .tdo, .status,
    .ro_word(jtag_ro_word), .ro_offer(jtag_ro_offer), .ro_ack(jtag_ro_ack),
    .cfg, .setup_parity_err(setup_err)
  );
endmodule
