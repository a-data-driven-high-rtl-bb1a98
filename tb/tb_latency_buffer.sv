// tb_latency_buffer: random writes and pops against a reference queue; checks
// the head word, random reads at any offset from the head (the matcher's second
// port), the count, and that writes into a full buffer are dropped with overflow.
module tb_latency_buffer;
  import hptdc_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, pop = 0, overflow, rd_parity_err;
  hit_t wr_data, head_data, rd_data;
  logic [7:0] head, rd_addr = 0;
  logic [8:0] count;
  int checks = 0, failures = 0, ovf_seen = 0, ovf_exp = 0;
  hit_t q[$];

  latency_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (overflow) ovf_seen++;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases: fill past full, then random, then drain
      bit w, p;
      int sz, off;
      w = (cyc < 300) ? 1 : (cyc < 3000) ? ($urandom_range(0, 99) < 50) : 0;
      p = (cyc < 300) ? 0 : (cyc < 3000) ? ($urandom_range(0, 99) < 50) : 1;
      wr_en = w; pop = p;
      wr_data = hit_t'($urandom);
      if (q.size() > 0) rd_addr = head + 8'($urandom_range(0, q.size() - 1));
      #1;
      sz = q.size();
      check(int'(count) == sz, $sformatf("count %0d exp %0d", count, sz));
      if (q.size() > 0) begin
        check(head_data == q[0], "head word");
        off = int'(8'(rd_addr - head));
        check(rd_data == q[off], "random read");
        check(!rd_parity_err, "parity");
      end
      @(posedge clk);
      if (w) begin
        if (q.size() < DEPTH) q.push_back(wr_data);
        else ovf_exp++;
      end
      if (p && q.size() > 0) void'(q.pop_front());
      @(negedge clk);
    end
    check(ovf_exp > 0 && ovf_seen == ovf_exp, $sformatf("overflows %0d exp %0d", ovf_seen, ovf_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
