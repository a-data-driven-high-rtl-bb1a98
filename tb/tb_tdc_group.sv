// tb_tdc_group: random hits on the 8 channels of a group at a rate that keeps
// the derandomizers from overflowing; every word leaving the latency buffer is
// checked against the per-channel queue of its channel, and all hits must
// arrive. A burst on one channel then overfills its derandomizer (chan_lost),
// and a long burst without popping overfills the latency buffer (lat_overflow).
module tb_tdc_group;
  import hptdc_pkg::*;
  localparam int LAT = 32;
  logic clk = 0, rst_n = 0;
  logic [7:0] chan_enable = '1;
  edge_mode_e edge_mode = EDGE_BOTH;
  logic [2:0] dead_time = 0;
  res_mode_e resolution = RES_40MHZ;
  logic [COARSE_W-1:0] roll_over = 12'd3563;
  logic [7:0][7:0] chan_offset;
  logic [7:0] hit_stb = 0, hit_leading = 0;
  logic [7:0][DLL_TAPS-1:0] hit_taps;
  logic [7:0][CNT_W-1:0] hit_cnt_a, hit_cnt_b;
  logic pop = 0;
  logic [4:0] head, rd_addr = 0;
  logic [5:0] count;
  hit_t head_data, rd_data;
  logic [7:0][2:0] chan_occ;
  logic chan_lost, lat_overflow, parity_err;
  int checks = 0, failures = 0, got = 0, sent = 0, lost_n = 0, ovf_n = 0;
  logic [TIME_W-1:0] q [8][$];

  tdc_group #(.LAT_DEPTH(LAT)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [DLL_TAPS-1:0] make_taps(int f);
    logic [DLL_TAPS-1:0] t;
    for (int i = 0; i < DLL_TAPS; i++) t[i] = (((f - i) % 32 + 32) % 32) < 16;
    return t;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (chan_lost) lost_n++;
    if (lat_overflow) ovf_n++;
  end

  // consumer: pops the head while enabled and checks it
  logic consume = 1;
  always @(negedge clk) begin
    pop <= 0;
    if (rst_n && consume && count != 0) begin
      int c;
      c = int'(head_data.chan);
      checks++;
      if (q[c].size() == 0 || head_data.time_m != q[c][0]) begin
        failures++;
        if (failures < 10) $display("FAIL chan %0d time %h", c, head_data.time_m);
      end
      if (q[c].size() > 0) void'(q[c].pop_front());
      got++;
      pop <= 1;
    end
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    chan_offset = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(posedge clk); #1;
      hit_stb = '0;
      for (int c = 0; c < 8; c++) begin
        if ($urandom_range(0, 99) < 8) begin
          int f;
          f = $urandom_range(16, 31);
          hit_stb[c] = 1; hit_leading[c] = 1'($urandom);
          hit_taps[c] = make_taps(f);
          hit_cnt_a[c] = CNT_W'((cyc % 3564) * 8); hit_cnt_b[c] = hit_cnt_a[c];
          q[c].push_back(TIME_W'((cyc % 3564) * 256 + f * 8));
          sent++;
        end
      end
    end
    @(posedge clk); #1; hit_stb = '0;
    repeat (50) @(posedge clk);
    check(got == sent, $sformatf("got %0d of %0d", got, sent));
    check(lost_n == 0 && ovf_n == 0, "no loss at low rate");
    // all channels hit every cycle with the consumer stopped: the arbiter
    // moves one word per cycle, so the derandomizers and then the latency
    // buffer overflow
    consume = 0;
    for (int cyc = 0; cyc < LAT + 10; cyc++) begin
      @(posedge clk); #1;
      hit_stb = 8'hFF;
      for (int c = 0; c < 8; c++) begin
        hit_leading[c] = 1; hit_taps[c] = make_taps(20);
        hit_cnt_a[c] = CNT_W'(cyc * 8); hit_cnt_b[c] = hit_cnt_a[c];
      end
    end
    begin
      int nfull = 0;
      for (int c = 0; c < 8; c++) if (chan_occ[c] == 3'd4) nfull++;
      check(nfull >= 7, $sformatf("derandomizers full during the burst (%0d)", nfull));
    end
    @(posedge clk); #1; hit_stb = '0;
    repeat (10) @(posedge clk);
    check(ovf_n > 0, "latency buffer overflow reported");
    check(lost_n > 0, "channel buffer loss reported");
    check(count == 6'(LAT), "latency buffer full");
    check(!parity_err, "no parity error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
