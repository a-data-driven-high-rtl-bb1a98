// tb_hptdc_top: end-to-end test of the whole TDC at its default sizes.
//
// The testbench plays the parts outside the RTL: the channel front ends (it
// latches the DLL tap pattern and the counter copies for each hit edge, with
// garbage in the counter copy that was changing), the trigger source, the
// JTAG master that loads the setup, and the readout receiver. A reference
// model keeps every hit it sends and predicts each event. Phases:
//   A  trigger matching, 32 bit readout, random hits on all channels, random
//      triggers (some overlapping), channel offsets, counter roll-over:
//      every event is checked hit for hit; then the same with a trigger every
//      40 cycles (1 MHz), where every event must come out complete;
//   B  overload of one group: channel buffer loss, latency buffer overflow and
//      the per-event hit limit must all be flagged in error words;
//   C  reject latency: with no triggers the latency buffers drain (read back
//      through the JTAG status register);
//   D  untriggered mode, pair measurements, byte readout: the stream is checked;
//   E  serial readout with token passing, trailing edges, triggered, with
//      buffer occupancy words;
//   F  trigger matching at the 160 and 320 MHz resolutions, with the DLL clock
//      4 and 8 times the logic clock: every event is checked hit for hit;
//   G  triggered events read out through JTAG (READOUT instruction);
//   H  a setup with a wrong parity bit raises error.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_hptdc_top;
  import hptdc_pkg::*;
  logic clk = 0, clk_dll = 0, rst_n = 0, bunch_reset = 0, event_reset = 0, trigger = 0;
  logic [CNT_W-1:0] count_a, count_b;
  logic [N_CHANNELS-1:0] hit_stb = '0, hit_leading = '0;
  logic [N_CHANNELS-1:0][DLL_TAPS-1:0] hit_taps = '0;
  logic [N_CHANNELS-1:0][CNT_W-1:0] hit_cnt_a = '0, hit_cnt_b = '0;
  logic [31:0] data_out;
  logic data_ready, get_data = 1, serial_out, serial_strobe, token_in = 0, token_out, error;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;

  hptdc_top dut (.*);
  // clk_dll runs nsub (1, 4 or 8) times faster than clk, rising edges together
  int unsigned nsub = 1, ph = 0;
  always begin
    #(16 / nsub);
    ph = (ph + 1) % (2 * nsub);
    clk = (ph < nsub); clk_dll = (ph % 2 == 0);
  end

  int checks = 0, failures = 0;
  // mechanism counters
  int n_overlap = 0, n_wrap = 0, n_chan_lost = 0, n_lat_ovf = 0, n_max_hits = 0;
  int n_reject = 0, n_untrig = 0, n_pair = 0, n_byte = 0, n_serial = 0, n_token = 0;
  int n_setup_err = 0, n_offset = 0, n_events = 0, n_trailing = 0, n_err_pin = 0, n_fine_res = 0, n_occ = 0, n_jtag_ro = 0;

  always @(posedge clk) if (rst_n && error) n_err_pin++;

  cfg_t cfg;
  typedef struct { int chan; bit lead; int t; int width; bit pair; } hit_s;
  hit_s sent[$];
  typedef struct { int ev; int bunch; int tag; } trig_s;
  trig_s trigs[$];
  logic [31:0] rx[$];
  logic [31:0] sr;
  int nbits = 0, nbytes = 0;
  bit token_ring = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #64000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- readout receiver ----------------
  always @(posedge clk) if (rst_n) begin
    if (data_ready && get_data && cfg.readout_mode == RO_PARALLEL) rx.push_back(data_out);
    if (data_ready && get_data && cfg.readout_mode == RO_BYTE) begin
      sr = {sr[23:0], data_out[7:0]}; nbytes++;
      if (nbytes == 4) begin rx.push_back(sr); nbytes = 0; n_byte++; end
    end
    if (serial_strobe && cfg.readout_mode == RO_SERIAL) begin
      sr = {sr[30:0], serial_out}; nbits++;
      if (nbits == 32) begin rx.push_back(sr); nbits = 0; n_serial++; end
    end
  end
  // a ring of one chip: token_out comes back as token_in a few cycles later
  always @(posedge clk) begin
    if (token_out) begin
      n_token++;
      fork begin repeat (3) @(negedge clk); token_in = token_ring; @(negedge clk); token_in = 0; end join_none
    end
  end

  // ---------------- JTAG master ----------------
  task automatic tclk(logic m, logic d);
    tms = m; tdi = d; #10 tck = 1; #10 tck = 0; #1;
  endtask
  task automatic jtag_ir(logic [3:0] code);
    tclk(1, 0); tclk(1, 0); tclk(0, 0); tclk(0, 0);
    for (int i = 0; i < 4; i++) tclk(i == 3, code[i]);
    tclk(1, 0); tclk(0, 0);
  endtask
  task automatic jtag_dr(int n, input logic [1023:0] din, output logic [1023:0] dout);
    tclk(1, 0); tclk(0, 0); tclk(0, 0);
    dout = '0;
    for (int i = 0; i < n; i++) begin dout[i] = tdo; tclk(i == n - 1, din[i]); end
    tclk(1, 0); tclk(0, 0);
  endtask
  task automatic load_setup(cfg_t c, bit bad_parity);
    logic [1023:0] din, dout;
    din = '0; din[CFG_W-1:0] = c; din[CFG_W] = (^c) ^ bad_parity;
    jtag_ir(4'h8); jtag_dr(CFG_W + 1, din, dout);
    cfg = c;
  endtask
  task automatic read_status(output logic [1023:0] st);
    jtag_ir(4'hA); jtag_dr(N_ERR + 5 + 9 + 4 * 9 + 32 * 3, '0, st);
  endtask

  // ---------------- front end model ----------------
  function automatic logic [DLL_TAPS-1:0] make_taps(int f);
    logic [DLL_TAPS-1:0] t;
    for (int i = 0; i < DLL_TAPS; i++) t[i] = (((f - i) % 32 + 32) % 32) < 16;
    return t;
  endfunction
  // times are in 98 ps units, 256 per bunch period
  function automatic int turn();
    return (int'(cfg.roll_over) + 1) * 256;
  endfunction
  function automatic int bunch_now();
    return int'(count_a[CNT_W-1:SUB_W]);
  endfunction

  // called at a falling edge: latch a hit edge on channel c during this cycle,
  // in DLL period s of the bunch period (random if s < 0), at DLL tap f
  task automatic fe_hit(int c, bit lead, int f, int s = -1);
    int n, t, pn, ps;
    n = bunch_now();
    if (s < 0) s = $urandom_range(0, nsub - 1);
    if (s > 0) begin pn = n; ps = s - 1; end
    else begin pn = (n == 0) ? int'(cfg.roll_over) : n - 1; ps = nsub - 1; end
    hit_stb[c] = 1'b1; hit_leading[c] = lead; hit_taps[c] = make_taps(f);
    if (f < 16) begin
      hit_cnt_a[c] = CNT_W'($urandom);
      hit_cnt_b[c] = CNT_W'({pn[COARSE_W-1:0], ps[SUB_W-1:0]});
    end else begin
      hit_cnt_a[c] = CNT_W'({n[COARSE_W-1:0], s[SUB_W-1:0]});
      hit_cnt_b[c] = hit_cnt_a[c];
    end
    t = (n * 256 + (s * 32 + f) * (8 / nsub) + int'(cfg.chan_offset[c])) % turn();
    if (cfg.chan_offset[c] != 0) n_offset++;
    sent.push_back('{chan: c, lead: lead, t: t, width: 0, pair: 0});
  endtask

  task automatic fire_trigger(int ev);
    int n;
    n = bunch_now();
    trigger = 1'b1;
    trigs.push_back('{ev: ev, bunch: n, tag: (n - int'(cfg.trigger_latency) + int'(cfg.roll_over) + 1) % (int'(cfg.roll_over) + 1)});
  endtask

  function automatic logic [31:0] hit_word(hit_s h);
    logic [4:0] ch = 5'(h.chan);
    if (h.pair) return {W_PAIR, cfg.tdc_id, ch, 1'b0, 7'(h.width), 12'(h.t / 256)};
    return {h.lead ? W_LEADING : W_TRAILING, cfg.tdc_id, ch, 20'(h.t)};
  endfunction

  function automatic bit in_window(int t, trig_s tr);
    int d;
    d = (t / 256 - tr.tag + int'(cfg.roll_over) + 1) % (int'(cfg.roll_over) + 1);
    return d < int'(cfg.match_window);
  endfunction

  // sort helper for multiset comparison
  function automatic void sort_words(ref logic [31:0] q[$]);
    q.sort();
  endfunction

  // parse rx into events and compare with the prediction for every trigger
  task automatic check_events(bit exact, bit want_hits);
    int ti = 0;
    while (rx.size() > 0) begin
      logic [31:0] w, got[$], exp_w[$];
      logic [7:0] flags;
      int nw;
      trig_s tr;
      w = rx.pop_front();
      check(w[31:28] == W_HEADER, $sformatf("header expected, got %h", w));
      if (ti >= trigs.size()) begin check(0, "more events than triggers"); break; end
      tr = trigs[ti]; ti++;
      check(w == {W_HEADER, cfg.tdc_id, 1'b0, 12'(tr.ev), 12'(tr.bunch)}, $sformatf("header %h ev %0d bunch %0d", w, tr.ev, tr.bunch));
      nw = 1; flags = '0;
      if (cfg.enable_occupancy && rx.size() > 0) begin
        w = rx.pop_front(); nw++;
        check(w[31:28] == W_OCCUPANCY && w[27:0] != '0, $sformatf("occupancy word %h", w));
        if (w[31:28] == W_OCCUPANCY) n_occ++;
      end
      while (rx.size() > 0 && rx[0][31:28] != W_TRAILER) begin
        w = rx.pop_front(); nw++;
        if (w[31:28] == W_ERROR) flags = w[7:0];
        else got.push_back(w);
      end
      if (rx.size() == 0) begin check(0, "missing trailer"); break; end
      w = rx.pop_front(); nw++;
      check(w == {W_TRAILER, cfg.tdc_id, 1'b0, 12'(tr.ev), 12'(nw)}, $sformatf("trailer %h exp ev %0d words %0d", w, tr.ev, nw));
      if (flags[ERR_CHAN_LOST]) n_chan_lost++;
      if (flags[ERR_LAT_OVF])   n_lat_ovf++;
      if (flags[ERR_MAX_HITS])  n_max_hits++;
      if (cfg.max_hits != 0) check(got.size() <= int'(cfg.max_hits), "hit limit kept");
      if (exact) begin
        foreach (sent[i]) if (in_window(sent[i].t, tr)) exp_w.push_back(hit_word(sent[i]));
        if (want_hits && exp_w.size() == 0) ;
        got.sort(); exp_w.sort();
        check(flags == 0, $sformatf("no errors expected (%b)", flags));
        check(got.size() == exp_w.size(), $sformatf("event %0d: %0d hits, exp %0d", tr.ev, got.size(), exp_w.size()));
        for (int i = 0; i < got.size() && i < exp_w.size(); i++)
          check(got[i] == exp_w[i], $sformatf("event %0d hit %h exp %h", tr.ev, got[i], exp_w[i]));
      end
      n_events++;
    end
    check(ti == trigs.size(), $sformatf("%0d events for %0d triggers", ti, trigs.size()));
    trigs.delete();
  endtask

  task automatic quiet(int n);
    repeat (n) @(negedge clk);
  endtask

  // ---------------- stimulus ----------------
  initial begin
    logic [1023:0] st;
    int ev = 0;
    cfg = CFG_DEFAULT;
    #3 trst_n = 0; #30 trst_n = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    tclk(1, 0); tclk(0, 0);

    // ---- phase A ----
    cfg = CFG_DEFAULT;
    cfg.tdc_id = 3'd6;
    cfg.count_offset = 12'd2500;               // roll-over happens during the phase
    cfg.chan_offset[5] = 8'd7; cfg.chan_offset[30] = 8'd40;
    load_setup(cfg, 0);
    @(negedge clk) bunch_reset = 1; @(negedge clk) bunch_reset = 0;
    @(negedge clk) event_reset = 1; @(negedge clk) event_reset = 0;
    quiet(10);
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      hit_stb = '0; trigger = 0;
      if (bunch_now() == 3563) n_wrap++;
      for (int c = 0; c < N_CHANNELS; c++)
        if ($urandom_range(0, 999) < 15) fe_hit(c, 1'b1, $urandom_range(0, 31));
      if (cyc > 300 && cyc < 2700 && ($urandom_range(0, 99) == 0 || (cyc % 500 == 7))) begin
        if (trigs.size() > 0 && trigs[$].bunch >= bunch_now() - 20 && trigs[$].bunch < bunch_now()) n_overlap++;
        fire_trigger(ev); ev++;
      end
      if (cyc % 500 == 12) begin fire_trigger(ev); ev++; n_overlap++; end  // 5 after the one at 7
    end
    @(negedge clk); hit_stb = '0; trigger = 0;
    quiet(400);
    check(!error, "no error in phase A");
    check_events(1, 1);
    sent.delete();

    // ---- phase A, continued: triggers at 1 MHz, one every 40 cycles ----
    n_events = 0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      hit_stb = '0; trigger = 0;
      for (int c = 0; c < N_CHANNELS; c++)
        if ($urandom_range(0, 999) < 15) fe_hit(c, 1'b1, $urandom_range(0, 31));
      if (cyc >= 240 && cyc % 40 == 0 && cyc < 1800) begin fire_trigger(ev); ev++; end
    end
    @(negedge clk); hit_stb = '0; trigger = 0;
    quiet(400);
    check(!error, "no error at 1 MHz trigger rate");
    check_events(1, 1);
    check(n_events == 39, $sformatf("%0d events at 1 MHz trigger rate, exp 39", n_events));
    sent.delete();

    // ---- phase B: overload group 1, hit limit 5 ----
    cfg.max_hits = 8'd5; cfg.chan_offset = '0;
    load_setup(cfg, 0);
    for (int cyc = 0; cyc < 700; cyc++) begin
      @(negedge clk);
      hit_stb = '0; trigger = 0;
      if (cyc >= 100 && cyc < 450) for (int c = 8; c < 16; c++) fe_hit(c, 1'b1, 20);
      if (cyc == 310 || cyc == 500 || cyc == 650) begin fire_trigger(ev); ev++; end
    end
    @(negedge clk); hit_stb = '0; trigger = 0;
    quiet(400);
    check(n_err_pin > 0, "error output raised by the overload");
    check_events(0, 0);
    sent.delete();

    // ---- phase C: reject latency drains the buffers without triggers ----
    cfg.max_hits = 8'd0;
    load_setup(cfg, 0);
    for (int cyc = 0; cyc < 200; cyc++) begin
      @(negedge clk); hit_stb = '0;
      for (int c = 0; c < N_CHANNELS; c++) if ($urandom_range(0, 99) < 5) fe_hit(c, 1'b1, 25);
    end
    @(negedge clk); hit_stb = '0;
    read_status(st);
    check(st[N_ERR + 14 +: 36] != '0, "hits buffered before reject");
    quiet(int'(cfg.reject_latency) + 300);
    read_status(st);
    check(st[N_ERR + 14 +: 36] == '0, $sformatf("latency buffers drained by reject (%h)", st[N_ERR + 14 +: 36]));
    if (st[N_ERR + 14 +: 36] == '0) n_reject++;
    check(rx.size() == 0, "nothing read out without triggers");
    sent.delete();

    // ---- phase D: untriggered, pair mode, byte readout ----
    cfg.enable_matching = 1'b0; cfg.edge_mode = EDGE_PAIR; cfg.readout_mode = RO_BYTE;
    cfg.enable_error_word = 1'b0;
    load_setup(cfg, 0);
    rx.delete();
    for (int k = 0; k < 40; k++) begin
      int c, f1, f2, len, t1, t2;
      c = $urandom_range(0, N_CHANNELS - 1);
      f1 = $urandom_range(16, 31); f2 = $urandom_range(16, 31);
      len = $urandom_range(1, 5);
      @(negedge clk); hit_stb = '0;
      t1 = bunch_now() * 256 + f1 * 8;
      hit_stb[c] = 1; hit_leading[c] = 1; hit_taps[c] = make_taps(f1);
      hit_cnt_a[c] = count_a; hit_cnt_b[c] = count_a;
      repeat (len) @(negedge clk);
      hit_stb = '0;
      t2 = bunch_now() * 256 + f2 * 8;
      hit_stb[c] = 1; hit_leading[c] = 0; hit_taps[c] = make_taps(f2);
      hit_cnt_a[c] = count_a; hit_cnt_b[c] = count_a;
      // width in 781 ps bins at this resolution
      sent.push_back('{chan: c, lead: 1, t: t1, width: (t2 - t1 + turn()) % turn() / 8 > 127 ? 127 : (t2 - t1 + turn()) % turn() / 8, pair: 1});
      @(negedge clk); hit_stb = '0;
      quiet(4);
    end
    quiet(300);
    begin
      logic [31:0] exp_w[$];
      foreach (sent[i]) exp_w.push_back(hit_word(sent[i]));
      rx.sort(); exp_w.sort();
      check(rx.size() == exp_w.size(), $sformatf("untriggered: %0d words, exp %0d", rx.size(), exp_w.size()));
      for (int i = 0; i < rx.size() && i < exp_w.size(); i++)
        check(rx[i] == exp_w[i], $sformatf("pair word %h exp %h", rx[i], exp_w[i]));
      if (rx.size() == exp_w.size() && rx.size() > 0) begin n_untrig++; n_pair += rx.size(); end
    end
    rx.delete(); sent.delete();

    // ---- phase E: triggered, trailing edges, serial readout, token ring ----
    cfg = CFG_DEFAULT;
    cfg.tdc_id = 3'd6; cfg.edge_mode = EDGE_TRAILING; cfg.readout_mode = RO_SERIAL;
    cfg.serial_div = 3'd1; cfg.token_enable = 1'b1; cfg.enable_occupancy = 1'b1;
    load_setup(cfg, 0);
    token_ring = 1;
    @(negedge clk) token_in = 1; @(negedge clk) token_in = 0;
    for (int cyc = 0; cyc < 1200; cyc++) begin
      @(negedge clk);
      hit_stb = '0; trigger = 0;
      for (int c = 0; c < N_CHANNELS; c++)
        if ($urandom_range(0, 999) < 10) begin
          bit lead = 1'($urandom);
          fe_hit(c, lead, $urandom_range(0, 31));
          if (lead) void'(sent.pop_back()); else n_trailing++;
        end
      if (cyc == 400 || cyc == 700 || cyc == 900) begin fire_trigger(ev); ev++; end
    end
    @(negedge clk); hit_stb = '0; trigger = 0;
    quiet(4000);
    token_ring = 0;
    quiet(20);
    check_events(1, 1);
    sent.delete();

    // ---- phase F: finer resolutions, DLL clock 4 and 8 times the logic clock ----
    for (int m = 1; m <= 2; m++) begin
      cfg = CFG_DEFAULT;
      cfg.tdc_id = 3'd2; cfg.resolution = res_mode_e'(m);
      cfg.chan_offset[3] = 8'd201;
      @(posedge clk) nsub = (m == 1) ? 4 : 8;
      load_setup(cfg, 0);
      quiet(20);
      for (int cyc = 0; cyc < 1500; cyc++) begin
        @(negedge clk);
        hit_stb = '0; trigger = 0;
        for (int c = 0; c < N_CHANNELS; c++)
          if ($urandom_range(0, 999) < 15) fe_hit(c, 1'b1, $urandom_range(0, 31));
        if (cyc > 300 && cyc < 1300 && $urandom_range(0, 99) == 0) begin fire_trigger(ev); ev++; end
        if (cyc == 1000) begin fire_trigger(ev); ev++; end
      end
      @(negedge clk); hit_stb = '0; trigger = 0;
      quiet(400);
      check(!error, "no error at the finer resolutions");
      begin
        int ev_before = n_events;
        check_events(1, 1);
        if (n_events > ev_before) n_fine_res++;
      end
      sent.delete();
    end

    // ---- phase G: readout through JTAG ----
    @(posedge clk) nsub = 1;
    cfg = CFG_DEFAULT;
    cfg.tdc_id = 3'd1; cfg.readout_mode = RO_JTAG;
    load_setup(cfg, 0);
    quiet(20);
    for (int cyc = 0; cyc < 800; cyc++) begin
      @(negedge clk);
      hit_stb = '0; trigger = 0;
      for (int c = 0; c < N_CHANNELS; c++)
        if ($urandom_range(0, 999) < 15) fe_hit(c, 1'b1, $urandom_range(0, 31));
      if (cyc == 300 || cyc == 500 || cyc == 510) begin fire_trigger(ev); ev++; end
    end
    @(negedge clk); hit_stb = '0; trigger = 0;
    quiet(300);
    check(data_ready == 1'b0, "parallel bus idle in JTAG mode");
    begin
      logic [1023:0] dout;
      int idle = 0;
      jtag_ir(4'hC);
      for (int k = 0; k < 400 && idle < 3; k++) begin
        jtag_dr(33, '0, dout);
        if (dout[32]) begin rx.push_back(dout[31:0]); n_jtag_ro++; idle = 0; end
        else idle++;
      end
    end
    check(n_jtag_ro > 3, "words read through JTAG");
    check_events(1, 1);
    sent.delete();

    // ---- phase H: setup parity error ----
    cfg.token_enable = 1'b0; cfg.readout_mode = RO_PARALLEL;
    load_setup(cfg, 1);
    quiet(5);
    check(error, "setup parity error reported");
    if (error) n_setup_err++;
    load_setup(cfg, 0);

    // ---- mechanisms ----
    check(n_events > 0, "events read");
    check(n_overlap > 0, "overlapping triggers");
    check(n_wrap > 0, "counter roll-over");
    check(n_offset > 0, "channel offsets");
    check(n_chan_lost > 0, "channel buffer loss flagged");
    check(n_lat_ovf > 0, "latency buffer overflow flagged");
    check(n_max_hits > 0, "hit limit flagged");
    check(n_reject > 0, "reject latency");
    check(n_untrig > 0 && n_pair > 0 && n_byte > 0, "untriggered pair byte readout");
    check(n_serial > 0 && n_token > 0 && n_trailing > 0, "serial readout with token passing");
    check(n_setup_err > 0, "setup parity");
    check(n_fine_res == 2, "160 and 320 MHz resolutions");
    check(n_occ > 0, "buffer occupancy words");
    check(n_jtag_ro > 0, "readout through JTAG");
    $display("mechanisms: events=%0d overlap=%0d wrap=%0d offset=%0d chan_lost=%0d lat_ovf=%0d max_hits=%0d reject=%0d untrig=%0d pair=%0d byte=%0d serial=%0d token=%0d trailing=%0d setup_err=%0d fine_res=%0d occ=%0d jtag_ro=%0d",
             n_events, n_overlap, n_wrap, n_offset, n_chan_lost, n_lat_ovf, n_max_hits, n_reject, n_untrig, n_pair, n_byte, n_serial, n_token, n_trailing, n_setup_err, n_fine_res, n_occ, n_jtag_ro);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
