// tb_readout_fifo: fills the FIFO at two programmed sizes, checks where full
// rises, that words beyond it are refused, and that words come out in order.
module tb_readout_fifo;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full, empty, parity_err;
  logic [7:0] size = 8'd255;
  logic [31:0] wr_data = 0, rd_data;
  logic [8:0] occupancy;
  int checks = 0, failures = 0;

  readout_fifo dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      int n, lim;
      size = (pass == 0) ? 8'd255 : 8'd9;
      lim  = int'(size) + 1;
      n = 0;
      for (int i = 0; i < 300; i++) begin
        wr_en = 1; wr_data = 32'hA000_0000 + i; #1;
        check(full == (n >= lim), $sformatf("full at %0d of %0d", n, lim));
        @(negedge clk);
        if (n < lim) n++;
      end
      wr_en = 0;
      check(occupancy == 9'(lim), "occupancy");
      for (int i = 0; i < lim; i++) begin
        check(!empty && rd_data == 32'hA000_0000 + i && !parity_err, "order");
        rd_en = 1; @(negedge clk); rd_en = 0;
      end
      check(empty, "drained");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
