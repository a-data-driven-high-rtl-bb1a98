// sync_fifo: single clock first-in first-out buffer with a parity bit per word.
//
// The word at the head is always visible on rd_data (show-ahead); rd_en pops it.
// A write when full and a read when empty are ignored. Each stored word carries
// an even parity bit that is checked at the head; parity_err is high while the
// head word fails the check. Used for the channel derandomizers, the trigger
// FIFO and the readout FIFO. Parity on internal memories follows the document;
// the show-ahead interface is this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count,
  output logic             parity_err
);
  logic [WIDTH:0] mem [DEPTH];
  logic [AW-1:0]  wr_ptr, rd_ptr;
  logic           do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data    = mem[rd_ptr][WIDTH-1:0];
  assign parity_err = !empty && (^mem[rd_ptr]);

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= incr(wr_ptr);
      if (do_rd) rd_ptr <= incr(rd_ptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= {^wr_data, wr_data};
  end
endmodule
