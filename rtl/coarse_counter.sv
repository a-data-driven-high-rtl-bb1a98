// coarse_counter: clock synchronous coarse time counter of the TDC.
//
// The counter runs on the DLL clock clk_dll, which the PLL derives from the
// 25 ns bunch clock at 1, 4 or 8 times its rate (resolution setting). It is
// {bunch, sub}: sub counts DLL periods inside a bunch period (0..0, 0..3 or
// 0..7) and bunch counts bunch periods, wrapping from roll_over to 0, so one
// turn spans roll_over+1 bunch periods (3564 for one LHC orbit). A bunch_reset
// (a pulse in the logic clock domain) is taken at the next bunch boundary and
// loads {count_offset, 0}, so bunch boundaries stay on the logic clock edges.
// count_a advances on the rising edge of clk_dll; count_b is a copy of it taken
// on the falling edge, stable around the rising edge while count_a is stable
// around the falling edge. The channel front ends latch both with the DLL taps;
// the hit encoder uses the DLL phase to pick the copy that was not changing.
// bunch is count_a's bunch part for the logic clock domain; clk_dll is phase
// locked to the logic clock clk, an integer multiple of it, with rising edges
// together. To keep bunch boundaries on clk edges after reset or a change of
// resolution, a bit toggled by clk is sampled on clk_dll: the DLL edge right
// after a clk edge sees it changed and sets sub to 1. The counter driven by
// the PLL clock and its use of the DLL phase follow the document; the two-copy
// scheme, the realignment and the reset rule are this
// design's reading of it.
module coarse_counter
  import hptdc_pkg::*;
(
  input  logic                clk,
  input  logic                clk_dll,
  input  logic                rst_n,
  input  logic                bunch_reset,
  input  res_mode_e           resolution,
  input  logic [COARSE_W-1:0] roll_over,
  input  logic [COARSE_W-1:0] count_offset,
  output logic [CNT_W-1:0]    count_a,
  output logic [CNT_W-1:0]    count_b,
  output logic [COARSE_W-1:0] bunch
);
  logic [COARSE_W-1:0] b;
  logic [SUB_W-1:0]    sub;
  logic                reset_pending;
  logic                boundary;
  logic                tog, tog_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tog <= 1'b0;
    else        tog <= !tog;
  end

  assign boundary = (sub >= sub_max(resolution));

  always_ff @(posedge clk_dll or negedge rst_n) begin
    if (!rst_n) begin
      b             <= '0;
      sub           <= '0;
      reset_pending <= 1'b0;
      tog_d         <= 1'b0;
    end else begin
      tog_d <= tog;
      if (boundary) begin
        sub <= '0;
        if (bunch_reset || reset_pending) b <= count_offset;
        else if (b >= roll_over)          b <= '0;
        else                              b <= b + 1'b1;
        reset_pending <= 1'b0;
      end else begin
        sub <= sub + 1'b1;
        if (bunch_reset) reset_pending <= 1'b1;
      end
      // the previous DLL edge was a clk edge
      if (tog != tog_d && sub_max(resolution) != '0) sub <= SUB_W'(1);
    end
  end

  assign count_a = {b, sub};
  assign bunch   = b;

  always_ff @(negedge clk_dll or negedge rst_n) begin
    if (!rst_n) count_b <= '0;
    else        count_b <= count_a;
  end
endmodule
