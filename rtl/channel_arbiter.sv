// channel_arbiter: fair arbitration of the channel buffers of one group.
//
// Every clock cycle at most one non-empty channel buffer is granted and popped;
// its word goes to the latency buffer (one word per cycle, the group bandwidth).
// The search starts one past the channel granted last (round robin), so every
// channel with data is served within N cycles. Combinational grant, registered
// round-robin pointer. The fair arbitration follows the document; round robin is
// this design's choice of fairness.
module channel_arbiter #(
  parameter int unsigned N = 8,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,     // channel buffer not empty
  output logic [N-1:0]  grant,   // one-hot pop
  output logic          valid,
  output logic [IW-1:0] index
);
  logic [IW-1:0] last;

  always_comb begin
    grant = '0;
    valid = 1'b0;
    index = '0;
    for (int k = 1; k <= N; k++) begin
      automatic int unsigned c = (int'(last) + k) % N;
      if (!valid && req[c]) begin
        valid    = 1'b1;
        index    = IW'(c);
        grant[c] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     last <= IW'(N - 1);
    else if (valid) last <= index;
  end
endmodule
