// trigger_matching: builds events from the latency buffers of the four groups.
//
// Triggered mode, per trigger taken from the trigger FIFO (tag = start of the
// window, in coarse counts):
//   WAIT    until the window [tag, tag+window) has closed plus MATCH_MARGIN cycles,
//           so all its hits have reached the latency buffers;
//   HEADER  write a header word (event id, bunch id) if enabled;
//   OCC     if enabled, write one word with the occupancy of the four latency
//           buffers at this moment, in units of 4 words (7 bits each);
//   CLEAN   per group, pop head hits older than the window start: no later
//           trigger can want them since tags come in time order;
//   SCAN    per group, read from the head without removing: hits inside the
//           window are written out (up to max_hits per event, 0 = no limit);
//           the scan stops at the first hit later than the window end plus
//           MATCH_MARGIN counts (hits of a group may arrive slightly out of time
//           order through the channel buffers and the arbiter). Because nothing
//           is removed, the next, overlapping trigger can match the same hits;
//   ERROR   write an error word when error flags are pending (if enabled);
//   TRAILER write a trailer word (event id, word count) and pop the trigger.
// While it waits or idles, hits older than reject_latency are popped from the
// group heads (one per cycle, round robin) to keep the buffers from filling;
// a hit is kept while a queued trigger's window could still contain it.
// Untriggered mode: each cycle the head of the next non-empty group is moved
// to the readout FIFO, with error words when flags are pending.
// The matcher stalls whenever the readout FIFO is full. Error inputs are made
// sticky and cleared when an error word carries them, so each event that lost
// hits is marked. The state machine is one-hot; an illegal state raises fsm_err
// and returns to IDLE. The matching, overlapping triggers, reject latency, hit
// limit, headers/trailers and marking of events follow the document; the order
// of the steps and the word formats are this design's.
module trigger_matching
  import hptdc_pkg::*;
#(
  parameter int unsigned LAT_DEPTH = 256,
  localparam int unsigned AW = $clog2(LAT_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cfg_t                 cfg,
  input  logic [COARSE_W-1:0]  now,
  // trigger FIFO
  input  trig_t                trig,
  input  logic                 trig_empty,
  output logic                 trig_pop,
  // latency buffers
  input  logic [N_GROUPS-1:0][AW:0] lb_count,
  input  hit_t [N_GROUPS-1:0]  lb_head_data,
  input  logic [N_GROUPS-1:0][AW-1:0] lb_head,
  input  hit_t [N_GROUPS-1:0]  lb_rd_data,
  output logic [AW-1:0]        lb_rd_addr,
  output logic [N_GROUPS-1:0]  lb_pop,
  // errors to be reported (pulses or levels)
  input  logic [N_ERR-1:0]     err_in,
  // readout FIFO
  output logic                 ro_wr,
  output logic [31:0]          ro_data,
  input  logic                 ro_full,
  output logic                 fsm_err,
  output logic [N_ERR-1:0]     err_pending
);
  typedef enum logic [7:0] {
    S_IDLE    = 8'b00000001,
    S_WAIT    = 8'b00000010,
    S_HEADER  = 8'b00000100,
    S_OCC     = 8'b00001000,
    S_CLEAN   = 8'b00010000,
    S_SCAN    = 8'b00100000,
    S_ERROR   = 8'b01000000,
    S_TRAILER = 8'b10000000
  } state_e;

  state_e               state;
  logic [1:0]           grp, rr;
  logic [AW-1:0]        ptr;
  logic [AW:0]          scanned;
  logic [7:0]           nhits;
  logic [11:0]          nwords;
  logic [N_ERR-1:0]     flags;
  logic                 max_hit_flag;

  logic [COARSE_W-1:0]  half;
  logic [COARSE_W-1:0]  d_scan, d_head, d_rr, age_rr, t_open;
  logic                 scan_before, scan_inside, scan_beyond, head_before;
  logic                 rr_reject;
  hit_t                 h_scan, h_head, h_rr;
  logic                 can_match;

  // occupancy word: each buffer count divided by 4, saturated to 7 bits
  function automatic logic [31:0] fmt_occ(logic [N_GROUPS-1:0][AW:0] c);
    logic [31:0] w;
    w = {W_OCCUPANCY, 28'd0};
    for (int g = 0; g < N_GROUPS; g++)
      w[7*g +: 7] = ((c[g] >> 2) > (AW+1)'(127)) ? 7'd127 : 7'(c[g] >> 2);
    return w;
  endfunction

  function automatic logic [31:0] fmt_hit(hit_t h, logic [1:0] g, logic [2:0] id);
    logic [31:0] w;
    w[27:25] = id;
    w[24:20] = {g, h.chan};
    if (h.pair) begin
      w[31:28] = W_PAIR;
      w[19:0]  = {1'b0, h.width, bunch_of(h.time_m)};
    end else begin
      w[31:28] = h.leading ? W_LEADING : W_TRAILING;
      w[19:0]  = h.time_m;
    end
    return w;
  endfunction

  always_comb begin
    half   = cfg.roll_over >> 1;
    h_scan = lb_rd_data[grp];
    h_head = lb_head_data[grp];
    h_rr   = lb_head_data[rr];
    d_scan = coarse_diff(bunch_of(h_scan.time_m), trig.tag, cfg.roll_over);
    d_head = coarse_diff(bunch_of(h_head.time_m), trig.tag, cfg.roll_over);
    age_rr = coarse_diff(now, bunch_of(h_rr.time_m), cfg.roll_over);
    t_open = coarse_diff(now, trig.tag, cfg.roll_over);
    scan_before = d_scan > half;
    scan_inside = !scan_before && (d_scan < cfg.match_window);
    scan_beyond = !scan_before &&
                  ({1'b0, d_scan} >= {1'b0, cfg.match_window} + (COARSE_W+1)'(MATCH_MARGIN));
    head_before = d_head > half;
    d_rr        = coarse_diff(bunch_of(h_rr.time_m), trig.tag, cfg.roll_over);
    // never reject a hit that a queued trigger may still want
    rr_reject   = (lb_count[rr] != '0) && (age_rr > cfg.reject_latency) && (age_rr <= half)
                  && (trig_empty || d_rr > half);
    can_match   = (cfg.max_hits == '0) || (nhits < cfg.max_hits);
  end

  // outputs of the current state
  always_comb begin
    trig_pop     = 1'b0;
    lb_pop       = '0;
    lb_rd_addr   = ptr;
    ro_wr        = 1'b0;
    ro_data      = '0;
    max_hit_flag = 1'b0;
    unique case (state)
      S_IDLE: begin
        if (!cfg.enable_matching) begin
          if (cfg.enable_error_word && flags != '0) begin
            ro_wr   = !ro_full;
            ro_data = {W_ERROR, cfg.tdc_id, 18'd0, flags};
          end else if (lb_count[rr] != '0 && !ro_full) begin
            ro_wr      = 1'b1;
            ro_data    = fmt_hit(h_rr, rr, cfg.tdc_id);
            lb_pop[rr] = 1'b1;
          end
        end else if (rr_reject) begin
          lb_pop[rr] = 1'b1;
        end
      end
      S_WAIT: if (rr_reject) lb_pop[rr] = 1'b1;
      S_HEADER: begin
        ro_wr   = cfg.enable_header && !ro_full;
        ro_data = {W_HEADER, cfg.tdc_id, 1'b0, trig.event_id, trig.bunch_id};
      end
      S_OCC: begin
        ro_wr   = !ro_full;
        ro_data = fmt_occ(lb_count);
      end
      S_CLEAN: if (lb_count[grp] != '0 && head_before) lb_pop[grp] = 1'b1;
      S_SCAN: begin
        if (scanned != lb_count[grp] && scan_inside) begin
          if (can_match) begin
            ro_wr   = !ro_full;
            ro_data = fmt_hit(h_scan, grp, cfg.tdc_id);
          end else begin
            max_hit_flag = 1'b1;
          end
        end
      end
      S_ERROR: begin
        ro_wr   = cfg.enable_error_word && (flags != '0) && !ro_full;
        ro_data = {W_ERROR, cfg.tdc_id, 18'd0, flags};
      end
      S_TRAILER: begin
        ro_wr    = cfg.enable_trailer && !ro_full;
        ro_data  = {W_TRAILER, cfg.tdc_id, 1'b0, trig.event_id, nwords + 12'd1};
        trig_pop = !(cfg.enable_trailer && ro_full);
      end
      default: ;
    endcase
  end

  assign fsm_err     = (state == state_e'(0)) || ((state & (state - 1'b1)) != 0);
  assign err_pending = flags;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      grp     <= '0;
      rr      <= '0;
      ptr     <= '0;
      scanned <= '0;
      nhits   <= '0;
      nwords  <= '0;
      flags   <= '0;
    end else begin
      // sticky error flags; the word that reports them clears them
      if (ro_wr && ro_data[31:28] == W_ERROR) flags <= err_in;
      else                                    flags <= flags | err_in;
      if (max_hit_flag) flags[ERR_MAX_HITS] <= 1'b1;
      if (ro_wr && state != S_IDLE) nwords <= nwords + 1'b1;

      unique case (state)
        S_IDLE: begin
          rr <= rr + 1'b1;
          if (cfg.enable_matching && !trig_empty) begin
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          rr <= rr + 1'b1;
          if ({1'b0, t_open} >= {1'b0, cfg.match_window} + (COARSE_W+1)'(MATCH_MARGIN)
              && t_open <= half) begin
            state  <= S_HEADER;
            nwords <= '0;
            nhits  <= '0;
          end
        end
        S_HEADER: if (!(cfg.enable_header && ro_full)) begin
          state <= cfg.enable_occupancy ? S_OCC : S_CLEAN;
          grp   <= '0;
        end
        S_OCC: if (!ro_full) state <= S_CLEAN;
        S_CLEAN: if (lb_count[grp] == '0 || !head_before) begin
          state   <= S_SCAN;
          ptr     <= lb_head[grp];
          scanned <= '0;
        end
        S_SCAN: begin
          if (scanned == lb_count[grp] || scan_beyond) begin
            // group done
            if (grp == 2'(N_GROUPS - 1)) state <= S_ERROR;
            else begin
              grp   <= grp + 1'b1;
              state <= S_CLEAN;
            end
          end else if (!(scan_inside && can_match && ro_full)) begin
            ptr     <= ptr + 1'b1;
            scanned <= scanned + 1'b1;
            if (scan_inside && can_match) nhits <= nhits + 1'b1;
          end
        end
        S_ERROR: if (!(cfg.enable_error_word && flags != '0 && ro_full)) state <= S_TRAILER;
        S_TRAILER: if (trig_pop) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
