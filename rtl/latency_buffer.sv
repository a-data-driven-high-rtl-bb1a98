// latency_buffer: the buffer of one channel group, holding hits until matching.
//
// A circular memory of DEPTH words with a parity bit each. Hits are written at
// the tail in arrival order; a write into a full buffer is dropped and pulses
// overflow. Unlike a plain FIFO the buffer has a second, random read port: the
// trigger matcher scans it from the head with rd_addr without removing words,
// so that a hit can be matched to several overlapping triggers. Words leave only
// through pop, which frees the head (hits too old for any trigger). In untriggered
// mode the head is simply popped like a FIFO. Reads are combinational. Depth,
// parity and the second port for overlapping triggers follow the document; the
// pointer interface is this design's.
module latency_buffer
  import hptdc_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  hit_t          wr_data,
  output logic          overflow,
  input  logic          pop,
  output logic [AW-1:0] head,
  output logic [AW:0]   count,
  output hit_t          head_data,
  input  logic [AW-1:0] rd_addr,
  output hit_t          rd_data,
  output logic          rd_parity_err
);
  logic [HIT_W:0] mem [DEPTH];
  logic [AW-1:0]  tail;
  logic           full, do_wr, do_pop;

  assign full     = (count == (AW+1)'(DEPTH));
  assign do_wr    = wr_en && !full;
  assign do_pop   = pop && (count != '0);
  assign overflow = wr_en && full;

  assign head_data     = mem[head][HIT_W-1:0];
  assign rd_data       = mem[rd_addr][HIT_W-1:0];
  assign rd_parity_err = ((rd_addr - head) < count[AW-1:0] || full) && (^mem[rd_addr]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (do_wr)  tail <= tail + 1'b1;
      if (do_pop) head <= head + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[tail] <= {^wr_data, wr_data};
  end
endmodule
