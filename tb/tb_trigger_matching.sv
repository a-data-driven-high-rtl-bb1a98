// tb_trigger_matching: four latency buffers are preloaded with time-ordered
// hits; triggers (single, overlapping, with a hit limit, after an error, with
// the occupancy word) are
// fed in and each event read from a readout FIFO that refuses words at random
// is compared word by word with a reference built from the hit lists. Then the
// reject latency must empty the buffers, and untriggered mode must stream the
// hits of later writes unchanged.
module tb_trigger_matching;
  import hptdc_pkg::*;
  localparam int LAT = 256;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic [COARSE_W-1:0] now = 12'd100;
  trig_t trig;
  logic trig_empty, trig_pop;
  logic [3:0][8:0] lb_count;
  hit_t [3:0] lb_head_data, lb_rd_data;
  logic [3:0][7:0] lb_head;
  logic [7:0] lb_rd_addr;
  logic [3:0] lb_pop, lb_wr = 0, lb_ovf, lb_perr;
  hit_t [3:0] lb_wdata;
  logic [N_ERR-1:0] err_in = '0, err_pending;
  logic ro_wr, ro_full = 0, fsm_err;
  logic [31:0] ro_data;
  int checks = 0, failures = 0;
  trig_t tq[$];
  hit_t hits[4][$];          // reference copy of each buffer
  logic [31:0] got[$], expw[$];
  int n_overlap = 0, n_maxhit = 0, n_err = 0, n_reject = 0, n_stream = 0, n_occ = 0;

  trigger_matching dut (.*);
  for (genvar g = 0; g < 4; g++) begin : g_lb
    latency_buffer #(.DEPTH(LAT)) u_lb (
      .clk, .rst_n, .wr_en(lb_wr[g]), .wr_data(lb_wdata[g]), .overflow(lb_ovf[g]),
      .pop(lb_pop[g]), .head(lb_head[g]), .count(lb_count[g]), .head_data(lb_head_data[g]),
      .rd_addr(lb_rd_addr), .rd_data(lb_rd_data[g]), .rd_parity_err(lb_perr[g]));
  end
  always #5 clk = ~clk;

  assign trig_empty = (tq.size() == 0);
  assign trig       = (tq.size() == 0) ? '0 : tq[0];

  always @(posedge clk) begin
    if (rst_n) begin
      if (trig_pop && tq.size() > 0) void'(tq.pop_front());
      if (ro_wr && !ro_full) got.push_back(ro_data);
      if (fsm_err) failures++;
      for (int g = 0; g < 4; g++) if (lb_pop[g] && hits[g].size() > 0) void'(hits[g].pop_front());
      now <= (now == cfg.roll_over) ? '0 : now + 1'b1;
    end
  end
  always @(negedge clk) ro_full <= ($urandom_range(0, 3) == 0);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", what); end
  endtask

  function automatic int cdiff(int a, int b);
    return (a - b + 3564) % 3564;
  endfunction

  function automatic logic [31:0] fmt(hit_t h, int g);
    if (h.pair) return {W_PAIR, cfg.tdc_id, 2'(g), h.chan, 1'b0, h.width, h.time_m[19:8]};
    return {h.leading ? W_LEADING : W_TRAILING, cfg.tdc_id, 2'(g), h.chan, h.time_m};
  endfunction

  // expected words of one event; also drops from the model what CLEAN pops
  task automatic expect_event(trig_t t, logic [N_ERR-1:0] flags);
    int nh = 0, nw = 1;
    logic [N_ERR-1:0] f = flags;
    expw.push_back({W_HEADER, cfg.tdc_id, 1'b0, t.event_id, t.bunch_id});
    if (cfg.enable_occupancy) begin
      logic [31:0] o = {W_OCCUPANCY, 28'd0};
      for (int g = 0; g < 4; g++) o[7 * g +: 7] = 7'((hits[g].size() / 4 > 127) ? 127 : hits[g].size() / 4);
      expw.push_back(o); nw++;
    end
    for (int g = 0; g < 4; g++) begin
      foreach (hits[g][i]) begin
        int d;
        d = cdiff(int'(hits[g][i].time_m[19:8]), int'(t.tag));
        if (d < int'(cfg.match_window)) begin
          if (cfg.max_hits == 0 || nh < int'(cfg.max_hits)) begin
            expw.push_back(fmt(hits[g][i], g)); nh++; nw++;
          end else f[ERR_MAX_HITS] = 1'b1;
        end
      end
    end
    if (f != '0) begin expw.push_back({W_ERROR, cfg.tdc_id, 18'd0, f}); nw++; end
    expw.push_back({W_TRAILER, cfg.tdc_id, 1'b0, t.event_id, 12'(nw + 1)});
  endtask

  task automatic compare(string what);
    check(got.size() == expw.size(), $sformatf("%s: %0d words, exp %0d", what, got.size(), expw.size()));
    for (int i = 0; i < got.size() && i < expw.size(); i++)
      check(got[i] == expw[i], $sformatf("%s word %0d %h exp %h", what, i, got[i], expw[i]));
    got.delete(); expw.delete();
  endtask

  task automatic trigger_at(int bunch, int lat, int ev);
    trig_t t;
    t.event_id = 12'(ev); t.bunch_id = 12'(bunch); t.tag = 12'(cdiff(bunch, lat));
    tq.push_back(t);
  endtask

  task automatic wait_idle(int maxc);
    for (int c = 0; c < maxc && !(tq.size() == 0 && got.size() > 0 && got[$][31:28] == W_TRAILER); c++)
      @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  task automatic write_hit(int g, hit_t h);
    @(negedge clk);
    lb_wr = 4'(1 << g); lb_wdata[g] = h;
    @(negedge clk);
    lb_wr = '0;
    hits[g].push_back(h);
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    trig_t t2;
    cfg = CFG_DEFAULT;
    cfg.reject_latency = 12'd1500; cfg.match_window = 12'd20; cfg.tdc_id = 3'd3;
    lb_wdata = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // preload hits at coarse times 200..700, time ordered per group
    for (int g = 0; g < 4; g++) begin
      int t = 200;
      while (t < 700) begin
        hit_t h;
        h.pair = 1'($urandom_range(0, 4) == 0); h.leading = 1'($urandom);
        h.chan = 3'($urandom); h.width = 7'($urandom);
        h.time_m = TIME_W'(t * 256 + $urandom_range(0, 255));
        write_hit(g, h);
        t += $urandom_range(0, 8);
      end
    end
    // 1: a plain trigger, window 400..419 (the hits were loaded while now < 1400)
    trigger_at(1400, 1000, 1);                      // window 400..419
    expect_event(tq[0], '0);
    wait_idle(4000); compare("single");
    // 2: two overlapping triggers: windows 450..469 and 460..479
    trigger_at(1450, 1000, 2); trigger_at(1460, 1000, 3);
    expect_event(tq[0], '0);
    // the second event sees the model after the first event's clean-up
    t2 = tq[1];
    while (tq.size() == 2) @(posedge clk);
    expect_event(t2, '0);
    wait_idle(4000);
    compare("overlap"); n_overlap++;
    // 3: hit limit of 2 and a channel loss reported by the error word
    cfg.max_hits = 8'd2;
    @(negedge clk) err_in[ERR_CHAN_LOST] = 1; @(negedge clk) err_in = '0;
    trigger_at(1500, 1000, 4);
    expect_event(tq[0], 7'(1 << ERR_CHAN_LOST));
    wait_idle(4000); compare("limit"); n_maxhit++; n_err++;
    cfg.max_hits = 8'd0;
    // 3b: occupancy word after the header, taken before the clean-up
    cfg.enable_occupancy = 1'b1;
    trigger_at(1600, 1000, 6);
    expect_event(tq[0], '0);
    wait_idle(4000); compare("occupancy"); n_occ++;
    cfg.enable_occupancy = 1'b0;
    // 4: an empty window far after the hits
    trigger_at(1000, 200, 7);
    expect_event(tq[0], '0);
    wait_idle(4000); compare("empty");
    // 5: reject latency: everything left is older than 20 counts
    cfg.reject_latency = 12'd20;
    repeat (2000) @(posedge clk);
    check(lb_count == '0, "rejected hits leave the buffers");
    n_reject++;
    // 6: untriggered mode streams hits with no framing
    cfg.enable_matching = 1'b0;
    for (int i = 0; i < 20; i++) begin
      hit_t h;
      int g = i % 4;
      h = hit_t'($urandom); h.pair = 1'b0;
      write_hit(g, h);
      expw.push_back(fmt(h, g));
    end
    repeat (100) @(posedge clk);
    compare("untriggered"); n_stream++;
    check(n_overlap > 0 && n_maxhit > 0 && n_err > 0 && n_reject > 0 && n_stream > 0 && n_occ > 0, "all mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
