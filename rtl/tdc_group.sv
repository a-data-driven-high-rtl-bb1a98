// tdc_group: eight TDC channels merged into one shared latency buffer.
//
// Each channel (tdc_channel) encodes and derandomizes its own hits; the fair
// channel_arbiter moves one word per clock from the channel buffers into the
// 256 deep latency_buffer, where the trigger matcher reads them. A channel
// buffer that is full drops new hits (lost), a full latency buffer drops words
// (lat_overflow); both are reported so the affected events can be marked.
// parity_err collects the parity checks of all buffers in the group;
// chan_occ gives the derandomizer occupancies for the status register.
// The group structure follows the document.
module tdc_group
  import hptdc_pkg::*;
#(
  parameter int unsigned LAT_DEPTH  = 256,
  parameter int unsigned CHAN_DEPTH = 4,
  localparam int unsigned AW = $clog2(LAT_DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [CH_PER_GROUP-1:0]              chan_enable,
  input  edge_mode_e                           edge_mode,
  input  logic [2:0]                           dead_time,
  input  res_mode_e                            resolution,
  input  logic [COARSE_W-1:0]                  roll_over,
  input  logic [CH_PER_GROUP-1:0][7:0]         chan_offset,
  input  logic [CH_PER_GROUP-1:0]              hit_stb,
  input  logic [CH_PER_GROUP-1:0]              hit_leading,
  input  logic [CH_PER_GROUP-1:0][DLL_TAPS-1:0] hit_taps,
  input  logic [CH_PER_GROUP-1:0][CNT_W-1:0]   hit_cnt_a,
  input  logic [CH_PER_GROUP-1:0][CNT_W-1:0]   hit_cnt_b,
  // latency buffer access for the matcher
  input  logic                pop,
  output logic [AW-1:0]       head,
  output logic [AW:0]         count,
  output hit_t                head_data,
  input  logic [AW-1:0]       rd_addr,
  output hit_t                rd_data,
  // status
  output logic [CH_PER_GROUP-1:0][$clog2(CHAN_DEPTH):0] chan_occ,
  output logic                chan_lost,
  output logic                lat_overflow,
  output logic                parity_err
);
  hit_t [CH_PER_GROUP-1:0]   ch_data;
  logic [CH_PER_GROUP-1:0]   ch_empty, ch_lost, ch_perr, grant;
  logic                      arb_valid, lb_perr;
  logic [CHAN_W-1:0]         arb_index;

  for (genvar c = 0; c < CH_PER_GROUP; c++) begin : g_ch
    tdc_channel #(.CHAN(CHAN_W'(c)), .DEPTH(CHAN_DEPTH)) u_ch (
      .clk, .rst_n,
      .enable(chan_enable[c]), .edge_mode, .dead_time, .resolution, .roll_over,
      .offset(chan_offset[c]),
      .hit_stb(hit_stb[c]), .hit_leading(hit_leading[c]), .hit_taps(hit_taps[c]),
      .hit_cnt_a(hit_cnt_a[c]), .hit_cnt_b(hit_cnt_b[c]),
      .rd_en(grant[c]), .rd_data(ch_data[c]), .empty(ch_empty[c]),
      .lost(ch_lost[c]), .parity_err(ch_perr[c]), .occupancy(chan_occ[c])
    );
  end

  channel_arbiter #(.N(CH_PER_GROUP)) u_arb (
    .clk, .rst_n, .req(~ch_empty), .grant, .valid(arb_valid), .index(arb_index)
  );

  latency_buffer #(.DEPTH(LAT_DEPTH)) u_lat (
    .clk, .rst_n,
    .wr_en(arb_valid), .wr_data(ch_data[arb_index]), .overflow(lat_overflow),
    .pop, .head, .count, .head_data, .rd_addr, .rd_data, .rd_parity_err(lb_perr)
  );

  assign chan_lost  = |ch_lost;
  assign parity_err = (|(ch_perr & ~ch_empty)) || lb_perr;
endmodule
