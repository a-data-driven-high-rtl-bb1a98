// trigger_unit: turns trigger pulses into time tags and queues them.
//
// On a trigger the unit takes the current coarse count (the bunch id), subtracts
// the programmed trigger latency modulo one counter turn to get the time tag,
// the start of the matching window in the past, and writes {event id, bunch id,
// tag} into a 16 deep FIFO read by the trigger matcher (show-ahead, pop removes).
// The event id counts every trigger, also one lost because the FIFO was full
// (trig_lost pulses), so event numbering stays in step with the rest of the
// system; event_reset clears it. The 16 deep FIFO and the latency subtraction
// follow the document; event numbering and loss handling are this design's.
module trigger_unit
  import hptdc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                trigger,
  input  logic                event_reset,
  input  logic [COARSE_W-1:0] count,
  input  logic [COARSE_W-1:0] roll_over,
  input  logic [COARSE_W-1:0] trigger_latency,
  input  logic                pop,
  output trig_t               trig,
  output logic                empty,
  output logic                trig_lost,
  output logic                parity_err,
  output logic [$clog2(DEPTH):0] occupancy
);
  logic [EVID_W-1:0] event_id;
  logic              full;
  trig_t             t_new;

  always_comb begin
    t_new.event_id = event_id;
    t_new.bunch_id = count;
    t_new.tag      = coarse_diff(count, trigger_latency, roll_over);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           event_id <= '0;
    else if (event_reset) event_id <= '0;
    else if (trigger)     event_id <= event_id + 1'b1;
  end

  assign trig_lost = trigger && full && !pop;

  sync_fifo #(.WIDTH($bits(trig_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(trigger), .wr_data(t_new),
    .rd_en(pop), .rd_data(trig), .empty, .full, .count(occupancy), .parity_err
  );
endmodule
