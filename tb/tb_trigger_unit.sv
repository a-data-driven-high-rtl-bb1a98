// tb_trigger_unit: triggers at known counter values; checks tag = count -
// latency modulo the counter turn, bunch id, event numbering, event reset and
// that the 17th queued trigger is lost but still numbered.
module tb_trigger_unit;
  import hptdc_pkg::*;
  logic clk = 0, rst_n = 0, trigger = 0, event_reset = 0, pop = 0;
  logic [COARSE_W-1:0] count = 0, roll_over = 12'd3563, trigger_latency = 12'd200;
  trig_t trig;
  logic empty, trig_lost, parity_err;
  logic [4:0] occupancy;
  int checks = 0, failures = 0, lost_n = 0;
  trig_t q[$];

  trigger_unit dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (trig_lost) lost_n++;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ev = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      trig_t t;
      int c;
      c = (i * 397) % 3564;
      count = COARSE_W'(c);
      t.event_id = EVID_W'(ev); t.bunch_id = COARSE_W'(c);
      t.tag = COARSE_W'((c - 200 + 3564) % 3564);
      if (i < 16) q.push_back(t);
      trigger = 1; @(negedge clk); trigger = 0; ev++;
    end
    check(lost_n == 4, $sformatf("lost %0d", lost_n));
    check(occupancy == 16, "16 deep");
    while (!empty) begin
      check(trig == q[0], $sformatf("trigger %h exp %h", trig, q[0]));
      check(!parity_err, "parity");
      void'(q.pop_front());
      pop = 1; @(negedge clk); pop = 0;
    end
    // numbering continued over the lost ones; event reset restarts it
    count = 12'd10; trigger = 1; @(negedge clk); trigger = 0;
    check(trig.event_id == 12'd20 && trig.tag == 12'd3374, "event 20, tag wraps");
    pop = 1; event_reset = 1; @(negedge clk); pop = 0; event_reset = 0;
    trigger = 1; @(negedge clk); trigger = 0;
    check(trig.event_id == 12'd0, "event reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
