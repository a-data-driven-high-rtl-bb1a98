// tb_coarse_counter: for each resolution setting, checks the {bunch, sub}
// sequence against a reference count of DLL clock periods, the wrap at
// roll_over, that count_b is count_a copied half a DLL period later, and that a
// bunch reset given in the middle of a bunch period takes effect only at the
// next bunch boundary, loading the offset. The DLL clock runs 1, 4 or 8 times
// faster than clk; boundaries must fall on clk edges.
module tb_coarse_counter;
  import hptdc_pkg::*;
  logic clk = 0, clk_dll = 0, rst_n = 0, bunch_reset = 0;
  res_mode_e resolution = RES_40MHZ;
  logic [COARSE_W-1:0] roll_over = 12'd9, count_offset = 12'd5, bunch;
  logic [CNT_W-1:0] count_a, count_b;
  int checks = 0, failures = 0;
  int unsigned ref_b, ref_s, smax;
  int n_bound_clk = 0;

  coarse_counter dut (.*);
  // clk_dll runs nsub times faster than clk, rising edges together
  int unsigned nsub = 1, ph = 0;
  always begin
    #(16 / nsub);
    ph = (ph + 1) % (2 * nsub);
    clk = (ph < nsub); clk_dll = (ph % 2 == 0);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step_ref();
    if (ref_s >= smax) begin
      ref_s = 0;
      ref_b = (ref_b >= roll_over) ? 0 : ref_b + 1;
    end else ref_s++;
  endtask

  initial begin
    #4000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int m = 0; m < 3; m++) begin
      resolution = res_mode_e'(m);
      smax = (m == 0) ? 0 : (m == 1) ? 3 : 7;
      @(posedge clk) nsub = smax + 1;
      roll_over = 12'd9; count_offset = 12'd5;
      rst_n = 0;
      repeat (2) @(posedge clk_dll);
      @(negedge clk_dll) rst_n = 1;
      ref_b = 0; ref_s = 0;
      for (int i = 0; i < 200; i++) begin
        @(posedge clk_dll); #1;
        step_ref();
        if (i < 2 * int'(smax + 1)) begin   // until aligned to clk edges: sync the model
          ref_s = int'(count_a[SUB_W-1:0]); ref_b = int'(bunch);
          if (i == 0) check(ref_b <= 1, "starts from 0 after reset");
          continue;
        end
        if (clk && ref_s == 0) n_bound_clk++;
        check(!(clk && ph == 0) || ref_s == 0, "bunch boundary on a clk edge");
        check(count_a == CNT_W'({ref_b[COARSE_W-1:0], ref_s[SUB_W-1:0]}),
              $sformatf("mode %0d count_a %h exp %0d.%0d", m, count_a, ref_b, ref_s));
        check(bunch == ref_b[COARSE_W-1:0], "bunch is the upper part of count_a");
        check(count_b != count_a, "count_b holds the old value around the rising edge");
        @(negedge clk_dll); #1;
        check(count_b == count_a, "count_b copies count_a at the falling edge");
      end
      // bunch reset one DLL period after a boundary (mid-bunch when sub > 0)
      while (count_a[SUB_W-1:0] != 0) begin @(posedge clk_dll); #1; end
      ref_b = bunch;
      #1 bunch_reset = 1;
      @(posedge clk_dll); #1;
      if (smax > 0) check(count_a[SUB_W-1:0] == 1 && bunch == ref_b[COARSE_W-1:0], "no reset before the boundary");
      bunch_reset = 0;
      while (count_a[SUB_W-1:0] != 0) begin @(posedge clk_dll); #1; end
      #1;
      check(bunch == count_offset, $sformatf("mode %0d bunch reset loads the offset at the boundary", m));
      repeat (smax + 1) @(posedge clk_dll); #1;
      check(bunch == count_offset + 1, "counting resumes from the offset");
      // full LHC orbit
      roll_over = 12'd3563; count_offset = 12'd3560;
      bunch_reset = 1;
      repeat (smax + 1) @(posedge clk_dll); #1;
      bunch_reset = 0;
      while (bunch != 12'd3560) begin @(posedge clk_dll); #1; end
      repeat (4 * (smax + 1)) @(posedge clk_dll); #1;
      check(bunch == 12'd0 && count_a[SUB_W-1:0] == 0, "wraps after 3563");
    end
    check(n_bound_clk > 50, "bunch boundaries seen at clk edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
