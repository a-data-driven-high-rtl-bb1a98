// tb_channel_arbiter: random request patterns; every cycle the grant must be
// the first requester after the last granted channel (round robin), one-hot,
// and a channel that keeps requesting must be served within N cycles.
module tb_channel_arbiter;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, grant;
  logic valid;
  logic [2:0] index;
  int checks = 0, failures = 0;
  int last = N - 1;
  int wait_cnt [N];

  channel_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (wait_cnt[i]) wait_cnt[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      int exp_c;
      req = (cyc < 1000) ? N'($urandom) : '1;
      #1;
      exp_c = -1;
      for (int k = 1; k <= N; k++)
        if (exp_c < 0 && req[(last + k) % N]) exp_c = (last + k) % N;
      checks++;
      if (exp_c < 0) begin
        if (valid || grant != '0) begin failures++; $display("FAIL grant without request"); end
      end else if (!valid || grant != (N'(1) << exp_c) || index != 3'(exp_c)) begin
        failures++; $display("FAIL cyc %0d req %b grant %b exp %0d", cyc, req, grant, exp_c);
      end
      if (cyc >= 1000) begin
        for (int i = 0; i < N; i++) begin
          wait_cnt[i] = grant[i] ? 0 : wait_cnt[i] + 1;
          checks++;
          if (wait_cnt[i] >= N) begin failures++; $display("FAIL channel %0d starved", i); end
        end
      end
      if (exp_c >= 0) last = exp_c;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
