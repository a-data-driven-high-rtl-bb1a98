// hit_encoder: turns the raw state latched at a hit into a time measurement.
//
// Inputs are the 32 DLL tap states and the two counter copies {bunch, sub}
// (see coarse_counter) latched by the channel front end at the hit. Tap i
// carries the DLL clock delayed by i/32 of its period, so the taps show one
// 1->0 step going up the taps; its position is the fine time (0..31). The DLL
// phase also settles which counter copy is safe: in the first half of the
// period count_a may have been changing, so count_b advanced by one DLL period
// is used; in the second half count_a is used. The result is put in 98 ps
// units: time = {bunch, bin}, bin = {tap,000} at 40 MHz, {sub[1:0],tap,0} at
// 160 MHz, {sub[2:0],tap} at 320 MHz. A per-channel offset (in bins) is then
// added modulo one counter turn. Purely combinational; legal is low when the
// taps do not show exactly one step. The counter/DLL scheme and the three
// resolutions follow the document; the decoding rule, the common 98 ps unit
// and the offset arithmetic are this design's.
module hit_encoder
  import hptdc_pkg::*;
(
  input  logic [DLL_TAPS-1:0] taps,
  input  logic [CNT_W-1:0]    cnt_a,
  input  logic [CNT_W-1:0]    cnt_b,
  input  res_mode_e           resolution,
  input  logic [COARSE_W-1:0] roll_over,
  input  logic [7:0]          offset,
  output logic [TIME_W-1:0]   time_m,
  output logic                legal
);
  logic [FINE_W-1:0]   fine;
  logic [COARSE_W-1:0] b_b, bunch;
  logic [SUB_W-1:0]    s_b, sub;
  logic [BIN_W-1:0]    bin;
  logic [5:0]          steps;
  logic [TIME_W:0]     sum;
  logic [COARSE_W:0]   c_sum;

  always_comb begin
    fine  = '0;
    steps = '0;
    for (int i = 0; i < DLL_TAPS; i++) begin
      if (taps[i] && !taps[(i + 1) % DLL_TAPS]) begin
        fine  = FINE_W'(i);
        steps = steps + 1'b1;
      end
    end
    legal = (steps == 6'd1);

    // count_b advanced by one DLL period
    b_b = cnt_b[CNT_W-1:SUB_W];
    s_b = cnt_b[SUB_W-1:0];
    if (s_b >= sub_max(resolution)) begin
      s_b = '0;
      b_b = (b_b >= roll_over) ? '0 : b_b + 1'b1;
    end else begin
      s_b = s_b + 1'b1;
    end
    if (fine[FINE_W-1]) begin
      bunch = cnt_a[CNT_W-1:SUB_W];
      sub   = cnt_a[SUB_W-1:0];
    end else begin
      bunch = b_b;
      sub   = s_b;
    end

    unique case (resolution)
      RES_160MHZ: bin = {sub[1:0], fine, 1'b0};
      RES_320MHZ: bin = {sub, fine};
      default:    bin = {fine, 3'b000};
    endcase

    sum   = {1'b0, bunch, bin} + (TIME_W+1)'(offset);
    c_sum = sum[TIME_W:BIN_W];
    if (c_sum > {1'b0, roll_over}) c_sum = c_sum - {1'b0, roll_over} - 1'b1;
    time_m = {c_sum[COARSE_W-1:0], sum[BIN_W-1:0]};
  end
endmodule
