// tb_jtag_tap: drives the TAP like a JTAG master: reads IDCODE after reset,
// loads a setup with correct parity and checks the cfg output, reads the setup
// back, loads one with wrong parity (setup_parity_err), reads STATUS, reads
// offered readout words through READOUT (each exactly once, acknowledged) and
// checks the one bit BYPASS register.
module tb_jtag_tap;
  import hptdc_pkg::*;
  localparam int SW = 20;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo;
  logic [SW-1:0] status = 20'hABCDE;
  cfg_t cfg;
  logic setup_parity_err;
  logic [31:0] ro_word = 32'h0;
  logic ro_offer = 0, ro_ack;
  int checks = 0, failures = 0;

  jtag_tap #(.STATUS_W(SW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic clk1(logic m, logic d);
    tms = m; tdi = d; #5 tck = 1; #5 tck = 0; #1;
  endtask

  // from Run-Test/Idle: load the instruction register
  task automatic ir(logic [3:0] code);
    clk1(1, 0); clk1(1, 0); clk1(0, 0); clk1(0, 0);      // Select-DR, Select-IR, Capture, Shift
    for (int i = 0; i < 4; i++) clk1(i == 3, code[i]);    // last bit leaves to Exit1
    clk1(1, 0); clk1(0, 0);                               // Update-IR, Idle
  endtask

  // from Run-Test/Idle: shift n bits through the selected data register
  task automatic dr(int n, input logic [1023:0] din, output logic [1023:0] dout);
    clk1(1, 0); clk1(0, 0); clk1(0, 0);                   // Select-DR, Capture, Shift
    dout = '0;
    for (int i = 0; i < n; i++) begin
      dout[i] = tdo;
      clk1(i == n - 1, din[i]);
    end
    clk1(1, 0); clk1(0, 0);                               // Update-DR, Idle
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [1023:0] din, dout;
    cfg_t c;
    #5 trst_n = 0;
    #20 trst_n = 1;
    clk1(1, 0); clk1(0, 0);                               // stay in reset, then Idle
    check(cfg == CFG_DEFAULT && !setup_parity_err, "default setup after reset");
    dr(32, '0, dout);                                     // IDCODE selected by reset
    check(dout[31:0] == 32'h8470_DACE, $sformatf("idcode %h", dout[31:0]));
    // new setup
    c = CFG_DEFAULT;
    c.trigger_latency = 12'd77; c.match_window = 12'd5; c.tdc_id = 3'd5;
    c.chan_enable = 32'h0F0F_1234; c.edge_mode = EDGE_PAIR; c.chan_offset[31] = 8'hA5;
    din = '0; din[CFG_W-1:0] = c; din[CFG_W] = ^c;
    ir(4'h8); dr(CFG_W + 1, din, dout);
    check(dout[CFG_W:0] == {^CFG_DEFAULT, CFG_DEFAULT}, "old setup shifted out");
    check(cfg == c && !setup_parity_err, "setup loaded");
    din[CFG_W] = ~din[CFG_W];
    dr(CFG_W + 1, din, dout);
    check(setup_parity_err, "parity error detected");
    // status
    ir(4'hA); dr(SW, '0, dout);
    check(dout[SW-1:0] == status, $sformatf("status %h", dout[SW-1:0]));
    // readout: nothing offered, then two words one after the other
    ir(4'hC); dr(33, '0, dout);
    check(dout[32] == 1'b0 && ro_ack == ro_offer, "no word offered");
    for (int k = 0; k < 2; k++) begin
      ro_word = $urandom; ro_offer = !ro_offer;
      dr(33, '0, dout);
      check(dout[32] == 1'b1 && dout[31:0] == ro_word, $sformatf("readout word %h exp %h", dout[31:0], ro_word));
      check(ro_ack == ro_offer, "word acknowledged");
      dr(33, '0, dout);
      check(dout[32] == 1'b0, "word read only once");
    end
    // bypass: one bit delay
    ir(4'hF); din = '0; din[0] = 1; dr(3, din, dout);
    check(dout[2:0] == 3'b010, $sformatf("bypass %b", dout[2:0]));
    // five TMS ones reset the TAP and the setup
    for (int i = 0; i < 5; i++) clk1(1, 0);
    clk1(0, 0);
    check(cfg == CFG_DEFAULT && !setup_parity_err, "TAP reset restores setup");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
