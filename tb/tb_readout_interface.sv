// tb_readout_interface: sends the same words in parallel, byte, serial and JTAG
// mode and rebuilds them on the receiving side (the JTAG side is modelled as a
// slower, unrelated clock that takes offered words and acknowledges them); then checks token passing: nothing
// is sent before token_in, and token_out follows the event trailer.
module tb_readout_interface;
  import hptdc_pkg::*;
  logic clk = 0, rst_n = 0;
  ro_mode_e mode = RO_PARALLEL;
  logic [2:0] serial_div = 0;
  logic token_enable = 0;
  logic [31:0] fifo_data, data_out;
  logic fifo_empty, fifo_rd, data_ready, get_data = 0, serial_out, serial_strobe;
  logic token_in = 0, token_out, fsm_err;
  logic [31:0] jtag_word;
  logic jtag_offer, jtag_ack = 0;
  logic tck = 0, off_s1 = 0, off_s2 = 0;
  int n_jtag = 0;
  int checks = 0, failures = 0, tokens_out = 0;
  logic [31:0] src[$], rx[$];
  logic [31:0] sr;
  int nbits = 0, nbytes = 0;

  readout_interface dut (.*);
  always #5 clk = ~clk;
  always #17 tck = ~tck;

  // JTAG side: synchronise the offer toggle, take the word, flip the ack
  always @(posedge tck) begin
    off_s1 <= jtag_offer; off_s2 <= off_s1;
    if (mode == RO_JTAG && off_s2 != jtag_ack && off_s2 == off_s1) begin
      rx.push_back(jtag_word); n_jtag++;
      jtag_ack <= off_s2;
    end
  end

  assign fifo_empty = (src.size() == 0);
  assign fifo_data  = (src.size() == 0) ? 32'd0 : src[0];

  always @(posedge clk) begin
    if (fifo_rd && src.size() > 0) void'(src.pop_front());
    if (token_out) tokens_out++;
    if (rst_n && fsm_err) failures++;
    if (data_ready && get_data && mode == RO_PARALLEL) rx.push_back(data_out);
    if (data_ready && get_data && mode == RO_BYTE) begin
      sr = {sr[23:0], data_out[7:0]}; nbytes++;
      if (nbytes == 4) begin rx.push_back(sr); nbytes = 0; end
    end
    if (serial_strobe && mode == RO_SERIAL) begin
      sr = {sr[30:0], serial_out}; nbits++;
      if (nbits == 32) begin rx.push_back(sr); nbits = 0; end
    end
  end

  // receiver takes words at random moments
  always @(negedge clk) get_data <= ($urandom_range(0, 3) != 0);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_words(int n, int max_cycles);
    logic [31:0] sent[$];
    rx.delete();
    for (int i = 0; i < n; i++) begin
      logic [31:0] w;
      w = (i == n - 1) ? {W_TRAILER, 28'($urandom)} : {W_LEADING, 28'($urandom)};
      src.push_back(w); sent.push_back(w);
    end
    for (int c = 0; c < max_cycles && rx.size() < n; c++) @(posedge clk);
    check(rx.size() == n, $sformatf("mode %0d: %0d of %0d words", mode, rx.size(), n));
    for (int i = 0; i < n && i < rx.size(); i++)
      check(rx[i] == sent[i], $sformatf("mode %0d word %0d %h exp %h", mode, i, rx[i], sent[i]));
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    mode = RO_PARALLEL; run_words(8, 200);
    mode = RO_BYTE;     run_words(8, 400);
    mode = RO_SERIAL; serial_div = 0; run_words(4, 400);
    mode = RO_SERIAL; serial_div = 2; run_words(3, 1000);
    mode = RO_JTAG;   run_words(6, 2000);
    repeat (10) @(posedge clk);   // the last acknowledge reaches the interface
    check(n_jtag == 6, "words read through JTAG once each");
    check(!data_ready, "bus idle in JTAG mode");
    // token passing
    mode = RO_PARALLEL; token_enable = 1; tokens_out = 0;
    rx.delete();
    src.push_back({W_HEADER, 28'd1}); src.push_back({W_LEADING, 28'd2}); src.push_back({W_TRAILER, 28'd3});
    repeat (20) @(posedge clk);
    check(rx.size() == 0, "silent without the token");
    @(negedge clk) token_in = 1; @(negedge clk) token_in = 0;
    repeat (40) @(posedge clk);
    check(rx.size() == 3, "event sent with the token");
    check(tokens_out == 1, $sformatf("token passed on once (%0d)", tokens_out));
    // token arriving with nothing to send is passed on at once
    @(negedge clk) token_in = 1; @(negedge clk) token_in = 0;
    repeat (5) @(posedge clk);
    check(tokens_out == 2, "empty chip passes the token");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
