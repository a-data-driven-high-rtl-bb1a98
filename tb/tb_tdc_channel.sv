// tb_tdc_channel: drives hit edges into one channel in each edge mode and
// checks the stored words against a reference queue: edge selection, pair words
// with their width, dead time, the disable bit and dropping when the 4 deep
// buffer is full.
module tb_tdc_channel;
  import hptdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable = 1;
  edge_mode_e edge_mode = EDGE_LEADING;
  logic [2:0] dead_time = 0;
  res_mode_e resolution = RES_40MHZ;
  logic [COARSE_W-1:0] roll_over = 12'd3563;
  logic [7:0] offset = 0;
  logic hit_stb = 0, hit_leading = 0;
  logic [DLL_TAPS-1:0] hit_taps = '0;
  logic [CNT_W-1:0] hit_cnt_a = 0, hit_cnt_b = 0;
  logic rd_en = 0;
  hit_t rd_data;
  logic empty, lost, parity_err;
  logic [2:0] occupancy;
  int checks = 0, failures = 0, lost_seen = 0;
  hit_t expq[$];

  tdc_channel #(.CHAN(3'd5)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [DLL_TAPS-1:0] make_taps(int f);
    logic [DLL_TAPS-1:0] t;
    for (int i = 0; i < DLL_TAPS; i++) t[i] = (((f - i) % 32 + 32) % 32) < 16;
    return t;
  endfunction

  // one edge at bunch n, DLL period s, fine f (second half of the period,
  // count_a is safe)
  task automatic edge_at(bit lead, int n, int f, int s = 0);
    @(negedge clk);
    hit_stb = 1; hit_leading = lead; hit_taps = make_taps(f);
    hit_cnt_a = CNT_W'(n * 8 + s); hit_cnt_b = hit_cnt_a;
    @(negedge clk);
    hit_stb = 0;
  endtask

  // time in 98 ps units; b is the bin inside the bunch, 8*f at 40 MHz
  function automatic hit_t mk(bit pair, bit lead, int n, int f, int w, int b = -1);
    hit_t h;
    h.pair = pair; h.leading = lead; h.chan = 3'd5;
    h.time_m = TIME_W'(n * 256 + ((b < 0) ? f * 8 : b)); h.width = WIDTH_W'(w);
    return h;
  endfunction

  task automatic drain();
    @(negedge clk);
    while (!empty) begin
      hit_t e;
      check(expq.size() > 0, "unexpected word");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        check(rd_data == e, $sformatf("word %h exp %h", rd_data, e));
      end
      check(!parity_err, "parity");
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    check(expq.size() == 0, "missing words");
  endtask

  always @(posedge clk) if (lost) lost_seen++;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // leading only
    edge_mode = EDGE_LEADING;
    edge_at(1, 100, 20); expq.push_back(mk(0, 1, 100, 20, 0));
    edge_at(0, 101, 20);
    edge_at(1, 102, 31); expq.push_back(mk(0, 1, 102, 31, 0));
    drain();
    // trailing only
    edge_mode = EDGE_TRAILING;
    edge_at(1, 200, 20);
    edge_at(0, 201, 17); expq.push_back(mk(0, 0, 201, 17, 0));
    drain();
    // both
    edge_mode = EDGE_BOTH;
    edge_at(1, 300, 16); expq.push_back(mk(0, 1, 300, 16, 0));
    edge_at(0, 300, 28); expq.push_back(mk(0, 0, 300, 28, 0));
    drain();
    // pair: width = 2*32 + 25 - 18 = 71 bins; a long pulse saturates
    edge_mode = EDGE_PAIR;
    edge_at(0, 400, 20);                   // trailing without leading: ignored
    edge_at(1, 400, 18);
    edge_at(0, 402, 25); expq.push_back(mk(1, 1, 400, 18, 71));
    edge_at(1, 500, 20);
    edge_at(0, 600, 20); expq.push_back(mk(1, 1, 500, 20, 127));
    drain();
    // dead time of 3 cycles: an edge 2 cycles later is ignored, 4 later kept
    edge_mode = EDGE_LEADING; dead_time = 3;
    edge_at(1, 700, 20); expq.push_back(mk(0, 1, 700, 20, 0));
    @(negedge clk);
    edge_at(1, 702, 20);
    repeat (2) @(negedge clk);
    edge_at(1, 705, 20); expq.push_back(mk(0, 1, 705, 20, 0));
    dead_time = 0;
    drain();
    // disabled channel stores nothing
    enable = 0; edge_at(1, 800, 20); enable = 1;
    drain();
    // buffer full: 6 hits without reading, 4 kept, 2 lost
    for (int i = 0; i < 6; i++) begin
      edge_at(1, 900 + i, 20);
      if (i < 4) expq.push_back(mk(0, 1, 900 + i, 20, 0));
    end
    check(occupancy == 4, "buffer holds 4");
    check(lost_seen == 2, $sformatf("lost pulses %0d", lost_seen));
    drain();
    // 320 MHz: width in 98 ps bins = (4 - 2) * 32 + 25 - 18 = 71
    resolution = RES_320MHZ; edge_mode = EDGE_PAIR;
    edge_at(1, 1000, 18, 2);
    edge_at(0, 1000, 25, 4); expq.push_back(mk(1, 1, 1000, 0, 71, 2 * 32 + 18));
    // 160 MHz: 195 ps bins, width = ((2 * 64 + 30 * 2) - (1 * 64 + 20 * 2)) / 2 = 42
    resolution = RES_160MHZ;
    edge_at(1, 1100, 20, 1);
    edge_at(0, 1100, 30, 2); expq.push_back(mk(1, 1, 1100, 0, 42, 1 * 64 + 40));
    drain();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
