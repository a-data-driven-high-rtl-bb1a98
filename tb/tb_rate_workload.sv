// tb_rate_workload: hit-rate and trigger-latency workloads on one channel group.
//
// Random hits arrive on all 8 channels of a group at 1 MHz and at 4 MHz per
// channel (40 MHz clock, so 2.5 % and 10 % per clock and channel). The
// latency buffer is emptied the way a trigger latency empties it: a hit leaves
// once it is older than the latency. The run measures hit loss in the
// derandomizers, the average derandomizer occupancy and the average latency
// buffer occupancy for 10, 20 and 30 us latency at 1 MHz, and checks them:
//   - at 1 MHz no measurable loss, at 4 MHz a loss below 1 %;
//   - average latency buffer occupancy within 15 % of 8 x rate x latency
//     (80 and 160 words) for 10 and 20 us, and overflows at 30 us, where that
//     average (240) comes close to the 256 words of the buffer.
module tb_rate_workload;
  import hptdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] hit_stb = 0, hit_leading = '1;
  logic [7:0][DLL_TAPS-1:0] hit_taps;
  logic [7:0][CNT_W-1:0] hit_cnt_a, hit_cnt_b;
  logic pop = 0;
  logic [7:0] head, rd_addr = 0;
  logic [8:0] count;
  hit_t head_data, rd_data;
  logic [7:0][2:0] chan_occ;
  logic chan_lost, lat_overflow, parity_err;
  logic [COARSE_W-1:0] now = 0;
  int checks = 0, failures = 0;
  int latency = 400;
  longint sent = 0, lost = 0, ovf = 0, occ_sum = 0, der_sum = 0, cycles = 0;

  tdc_group dut (
    .clk, .rst_n, .chan_enable('1), .edge_mode(EDGE_LEADING), .dead_time(3'd0),
    .resolution(RES_40MHZ), .roll_over(12'd3563), .chan_offset('0),
    .hit_stb, .hit_leading, .hit_taps, .hit_cnt_a, .hit_cnt_b,
    .pop, .head, .count, .head_data, .rd_addr, .rd_data,
    .chan_occ, .chan_lost, .lat_overflow, .parity_err);
  always #5 clk = ~clk;   // one tick per 25 ns clock period

  function automatic logic [DLL_TAPS-1:0] make_taps(int f);
    logic [DLL_TAPS-1:0] t;
    for (int i = 0; i < DLL_TAPS; i++) t[i] = (((f - i) % 32 + 32) % 32) < 16;
    return t;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    now <= (now == 12'd3563) ? '0 : now + 1'b1;
    if (chan_lost) lost += 1;
    if (lat_overflow) ovf += 1;
    occ_sum += longint'(count);
    for (int c = 0; c < 8; c++) der_sum += longint'(chan_occ[c]);
    cycles += 1;
  end

  // the trigger latency: the head leaves once it is older than the latency
  always @(negedge clk)
    pop <= (count != 0) && (int'(coarse_diff(now, bunch_of(head_data.time_m), 12'd3563)) > latency);

  task automatic run(int per_mille, int lat, int ncycles);
    latency = lat; sent = 0; lost = 0; ovf = 0; occ_sum = 0; der_sum = 0;
    repeat (lat + 200) begin   // reach steady state before measuring
      @(negedge clk); drive(per_mille);
    end
    sent = 0; lost = 0; ovf = 0; occ_sum = 0; der_sum = 0; cycles = 0;
    repeat (ncycles) begin @(negedge clk); drive(per_mille); end
    @(negedge clk); hit_stb = '0;
  endtask

  task automatic drive(int per_mille);
    hit_stb = '0;
    for (int c = 0; c < 8; c++)
      if ($urandom_range(0, 999) < per_mille) begin
        hit_stb[c] = 1; hit_taps[c] = make_taps($urandom_range(16, 31));
        hit_cnt_a[c] = {now, 3'b000}; hit_cnt_b[c] = hit_cnt_a[c];
        sent += 1;
      end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real loss, occ, der;
    repeat (2) @(negedge clk); rst_n = 1;
    // hit loss at 1 and 4 MHz per channel (short latency, no overflow)
    run(25, 100, 40000);
    loss = real'(lost) / real'(sent); der = real'(der_sum) / real'(cycles) / 8.0;
    $display("1 MHz: sent %0d lost %0d (%f), mean derandomizer occupancy %f", sent, lost, loss, der);
    check(loss < 0.001, "1 MHz: insignificant loss");
    run(100, 100, 40000);
    loss = real'(lost) / real'(sent); der = real'(der_sum) / real'(cycles) / 8.0;
    $display("4 MHz: sent %0d lost %0d (%f), mean derandomizer occupancy %f", sent, lost, loss, der);
    check(loss < 0.01, "4 MHz: loss below 1 %");
    check(der > 0.1, "4 MHz: derandomizers in use");
    // latency buffer occupancy at 1 MHz, latencies 10, 20, 30 us
    for (int k = 1; k <= 3; k++) begin
      int lat;
      real expect_occ;
      lat = 400 * k;
      expect_occ = 8.0 * 0.025 * real'(lat);
      run(25, lat, 20000);
      occ = real'(occ_sum) / real'(cycles);
      $display("1 MHz, %0d us: mean latency buffer occupancy %f (expected %f), overflows %0d", 10 * k, occ, expect_occ, ovf);
      if (k < 3) begin
        check(occ > 0.85 * expect_occ && occ < 1.15 * expect_occ, "occupancy matches 8 x rate x latency");
      end else begin
        check(ovf > 0, "30 us: latency buffer overflows");
      end
      if (k == 1) check(ovf == 0, "10 us: no overflow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
