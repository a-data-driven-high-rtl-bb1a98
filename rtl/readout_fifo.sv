// readout_fifo: the output buffer between trigger matching and the readout port.
//
// A 256 deep FIFO of 32 bit readout words with parity (sync_fifo). Its usable
// size is programmable: full rises once it holds size+1 words, so a smaller
// FIFO can be chosen to limit how much an event can pile up. The writer (the
// trigger matcher) stalls on full, which is how back pressure propagates from
// the readout into the latency buffers. Depth and programmable size follow the
// document; stalling the writer is this design's back propagation scheme.
module readout_fifo #(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [AW-1:0] size,       // usable depth minus one
  input  logic         wr_en,
  input  logic [31:0]  wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [31:0]  rd_data,
  output logic         empty,
  output logic         parity_err,
  output logic [AW:0]  occupancy
);
  logic mem_full;

  assign full = mem_full || (occupancy > {1'b0, size});

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(wr_en && !full), .wr_data,
    .rd_en, .rd_data, .empty, .full(mem_full), .count(occupancy), .parity_err
  );
endmodule
