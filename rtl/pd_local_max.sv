// pd_local_max: three-sample sliding-window local-maximum detector.
//
// The window holds the previous, current and next samples of the linear
// magnitude stream. Each valid input shifts the window by one (next ->
// current -> previous); the cycle after a shift the current sample is
// declared a peak when it was above the threshold and its magnitude is
// strictly greater than both neighbours:
//   above(curr) && |curr| > |prev| && |curr| > |next|.
// Peaks leave through a registered output (peak_valid, peak) one sample per
// clock at most.
//
// The window runs over the stream as it arrives, so the neighbours are the
// samples before and after in stream order. In the range-Doppler chain the
// stream is range-major, so these are the adjacent Doppler bins of the same
// range bin (and, at a range-bin edge, the last/first bin of the neighbouring
// range bin). The window is not flushed at frame ends: the last sample of a
// stream is judged when the next sample arrives. After reset the "previous"
// sample of the first input is taken as magnitude 0.
//
// Timing: a sample is judged two cycles after its successor enters; the peak
// appears on the output one cycle later. Throughput one sample per clock.
// The window and comparison follow the source description; the stream-order
// neighbourhood, the reset value and the lack of flushing are this design's
// choices.
module pd_local_max
  import radar_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  valid_in,
  input  peak_t sample_in,
  input  logic  above_in,
  output logic  peak_valid,
  output peak_t peak
);

  peak_t       win_prev, win_curr, win_next;
  logic        above_curr, above_next;
  logic [1:0]  fill;      // samples in curr/next (saturates at 2)
  logic        shifted;   // window moved in the previous cycle

  always_ff @(posedge clk) begin
    if (rst) begin
      win_prev   <= '0;
      win_curr   <= '0;
      win_next   <= '0;
      above_curr <= 1'b0;
      above_next <= 1'b0;
      fill       <= '0;
      shifted    <= 1'b0;
    end else begin
      shifted <= valid_in;
      if (valid_in) begin
        win_prev   <= win_curr;
        win_curr   <= win_next;
        above_curr <= above_next;
        win_next   <= sample_in;
        above_next <= above_in;
        if (fill != 2'd2) fill <= fill + 2'd1;
      end
    end
  end

  logic is_peak;
  always_comb begin
    is_peak = shifted && (fill == 2'd2) && above_curr &&
              (win_curr.mag > win_prev.mag) && (win_curr.mag > win_next.mag);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      peak_valid <= 1'b0;
      peak       <= '0;
    end else begin
      peak_valid <= is_peak;
      if (is_peak) peak <= win_curr;
    end
  end

endmodule
