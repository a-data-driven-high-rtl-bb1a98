// tdc_channel: one TDC channel: edge selection, dead time and derandomizer.
//
// The full custom front end (not part of this RTL) latches the DLL taps and the
// two coarse counter copies at a hit edge and presents them for one clock with
// hit_stb; hit_leading tells which edge it was. The channel encodes the time
// (hit_encoder) and, when enabled, stores it in a 4 deep derandomizer buffer
// from which the group arbiter pops it (show-ahead, rd_en pops).
//   EDGE_LEADING / EDGE_TRAILING / EDGE_BOTH store the selected edges.
//   EDGE_PAIR keeps the leading time and, on the next trailing edge, stores one
//   word with the leading time and the pulse width in bins of the selected
//   resolution (7 bits, saturated).
// After a stored edge the channel ignores edges for dead_time clock cycles.
// A hit arriving while the buffer is full is dropped and pulses lost.
// Buffer depth, drop-when-full, edge modes and dead time follow the document;
// the pair word layout and the dead time counting in clock cycles are this
// design's choices.
module tdc_channel
  import hptdc_pkg::*;
#(
  parameter logic [CHAN_W-1:0] CHAN = '0,
  parameter int unsigned DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  logic                enable,
  input  edge_mode_e          edge_mode,
  input  logic [2:0]          dead_time,
  input  res_mode_e           resolution,
  input  logic [COARSE_W-1:0] roll_over,
  input  logic [7:0]          offset,
  // sampled front end
  input  logic                hit_stb,
  input  logic                hit_leading,
  input  logic [DLL_TAPS-1:0] hit_taps,
  input  logic [CNT_W-1:0]    hit_cnt_a,
  input  logic [CNT_W-1:0]    hit_cnt_b,
  // derandomizer read side
  input  logic                rd_en,
  output hit_t                rd_data,
  output logic                empty,
  output logic                lost,
  output logic                parity_err,
  output logic [$clog2(DEPTH):0] occupancy
);
  logic [TIME_W-1:0] t_now;
  logic              legal;
  logic [2:0]        dead_cnt;
  logic [TIME_W-1:0] lead_time;
  logic              lead_valid;
  logic              take, store, full;
  hit_t              w;
  logic [COARSE_W-1:0] dc;
  logic [TIME_W+1:0]   width_full;

  hit_encoder u_enc (
    .taps(hit_taps), .cnt_a(hit_cnt_a), .cnt_b(hit_cnt_b),
    .resolution, .roll_over(roll_over), .offset(offset), .time_m(t_now), .legal(legal)
  );

  // an edge is taken when the channel is enabled, awake and the edge is wanted
  always_comb begin
    take = hit_stb && enable && legal && (dead_cnt == '0);
    unique case (edge_mode)
      EDGE_LEADING:  take = take && hit_leading;
      EDGE_TRAILING: take = take && !hit_leading;
      EDGE_BOTH:     ;
      EDGE_PAIR:     take = take && (hit_leading || lead_valid);
    endcase
    store = take && !(edge_mode == EDGE_PAIR && hit_leading);

    dc         = coarse_diff(bunch_of(t_now), bunch_of(lead_time), roll_over);
    width_full = {2'b00, dc, t_now[BIN_W-1:0]} - {2'b00, {COARSE_W{1'b0}}, lead_time[BIN_W-1:0]};
    // width in bins of the selected resolution
    unique case (resolution)
      RES_160MHZ: width_full = width_full >> 1;
      RES_320MHZ: ;
      default:    width_full = width_full >> 3;
    endcase

    w.pair    = (edge_mode == EDGE_PAIR);
    w.leading = hit_leading || (edge_mode == EDGE_PAIR);
    w.chan    = CHAN;
    w.time_m  = (edge_mode == EDGE_PAIR) ? lead_time : t_now;
    w.width   = '0;
    if (edge_mode == EDGE_PAIR)
      w.width = (width_full > (TIME_W+2)'((1 << WIDTH_W) - 1)) ? '1 : width_full[WIDTH_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dead_cnt   <= '0;
      lead_valid <= 1'b0;
      lead_time  <= '0;
    end else begin
      if (take)                dead_cnt <= dead_time;
      else if (dead_cnt != '0) dead_cnt <= dead_cnt - 1'b1;
      if (take && edge_mode == EDGE_PAIR) begin
        lead_valid <= hit_leading;
        if (hit_leading) lead_time <= t_now;
      end
    end
  end

  assign lost = store && full;

  sync_fifo #(.WIDTH(HIT_W), .DEPTH(DEPTH)) u_derand (
    .clk, .rst_n,
    .wr_en(store), .wr_data(w),
    .rd_en, .rd_data, .empty, .full,
    .count(occupancy), .parity_err
  );
endmodule
