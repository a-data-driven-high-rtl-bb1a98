// tb_hit_encoder: random hit phases and counter states at all three resolution
// settings, including garbage in the counter copy that was changing, checked
// against the ideal time in 98 ps units plus the channel offset modulo one
// counter turn; malformed tap patterns must be flagged.
module tb_hit_encoder;
  import hptdc_pkg::*;
  logic [DLL_TAPS-1:0] taps;
  logic [CNT_W-1:0]    cnt_a, cnt_b;
  logic [COARSE_W-1:0] roll_over;
  res_mode_e           resolution;
  logic [7:0]          offset;
  logic [TIME_W-1:0]   time_m;
  logic                legal;
  int checks = 0, failures = 0;

  hit_encoder dut (.*);

  function automatic logic [DLL_TAPS-1:0] make_taps(int f);
    logic [DLL_TAPS-1:0] t;
    for (int i = 0; i < DLL_TAPS; i++) t[i] = (((f - i) % 32 + 32) % 32) < 16;
    return t;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 6000; n++) begin
      int unsigned roll, N, S, nsub, f, off, exp_t, turn, pb, ps, tick;
      resolution = res_mode_e'(n % 3);
      nsub = (n % 3 == 0) ? 1 : (n % 3 == 1) ? 4 : 8;
      tick = 256 / (nsub * 32);               // 98 ps units per fine bin
      roll = (n % 5 == 0) ? 3563 : 5 + $urandom_range(0, 200);
      N    = $urandom_range(0, roll);
      S    = $urandom_range(0, nsub - 1);
      if (n % 7 == 0) begin N = (n % 2) ? 0 : roll; S = (n % 2) ? 0 : nsub - 1; end
      f    = $urandom_range(0, 31);
      off  = (n % 4 == 0) ? 0 : $urandom_range(0, 255);
      roll_over = COARSE_W'(roll);
      offset    = 8'(off);
      taps      = make_taps(f);
      // previous DLL period
      if (S > 0) begin pb = N; ps = S - 1; end
      else begin pb = (N == 0) ? roll : N - 1; ps = nsub - 1; end
      if (f < 16) begin
        // count_a was switching: anything may have been latched
        cnt_a = CNT_W'($urandom);
        cnt_b = CNT_W'({pb[COARSE_W-1:0], ps[SUB_W-1:0]});
      end else begin
        cnt_a = CNT_W'({N[COARSE_W-1:0], S[SUB_W-1:0]});
        cnt_b = cnt_a;
      end
      turn  = (roll + 1) * 256;
      exp_t = (N * 256 + (S * 32 + f) * tick + off) % turn;
      #1;
      checks++;
      if (!legal || time_m != TIME_W'({exp_t / 256, 8'(exp_t % 256)})) begin
        failures++;
        if (failures < 10) $display("FAIL mode=%0d N=%0d S=%0d f=%0d off=%0d roll=%0d got %h exp %0d",
                                    n % 3, N, S, f, off, roll, time_m, exp_t);
      end
    end
    // a bubble in the taps: two steps
    taps = make_taps(10); taps[20] = 1'b1; #1;
    checks++; if (legal) failures++;
    taps = '0; #1;
    checks++; if (legal) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
