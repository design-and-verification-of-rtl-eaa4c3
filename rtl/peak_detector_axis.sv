// peak_detector_axis: the packaged peak detection accelerator, an
// AXI4-Stream slave in front of peak_detector_core.
//
// Each beat's tdata carries {magnitude[31:0], range index[9:0], Doppler
// index[5:0]} (48 bits, the same order as the peak FIFO word). The interface
// stage accepts a beat every clock (s_axis_tready is held high once out of
// reset: the accelerator never stalls its source), registers the beat and
// unpacks the three fields into the core. s_axis_tlast marks the end of a
// range-Doppler frame; frames_seen counts frames for monitoring.
//
// Timing: one cycle through the interface stage, then the core's latency.
// Field set, one-beat-per-clock and no stalling follow the source; the
// tdata bit layout and the frame counter are this design's choices.
module peak_detector_axis
  import radar_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst,
  // AXI4-Stream slave
  input  logic [PEAK_W-1:0] s_axis_tdata,
  input  logic              s_axis_tvalid,
  input  logic              s_axis_tlast,
  output logic              s_axis_tready,
  // threshold register
  input  logic [MAG_W-1:0]  threshold_val,
  input  logic              threshold_load,
  // FIFO read interface
  input  logic              fifo_rd_en,
  output logic [PEAK_W-1:0] fifo_dout,
  output logic              fifo_empty,
  output logic              fifo_full,
  output logic              fifo_overflow,
  output logic [15:0]       frames_seen
);

  logic  in_valid;
  peak_t in_beat;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_axis_tready <= 1'b0;
      in_valid      <= 1'b0;
      in_beat       <= '0;
      frames_seen   <= '0;
    end else begin
      s_axis_tready <= 1'b1;
      in_valid      <= s_axis_tvalid && s_axis_tready;
      if (s_axis_tvalid && s_axis_tready) begin
        in_beat <= peak_t'(s_axis_tdata);
        if (s_axis_tlast) frames_seen <= frames_seen + 16'd1;
      end
    end
  end

  peak_detector_core #(.FIFO_DEPTH(FIFO_DEPTH)) u_core (
    .clk, .rst,
    .valid_in      (in_valid),
    .mag_in        (in_beat.mag),
    .range_in      (in_beat.range_idx),
    .doppler_in    (in_beat.doppler_idx),
    .threshold_val,
    .threshold_load,
    .fifo_rd_en,
    .fifo_dout,
    .fifo_empty,
    .fifo_full,
    .fifo_overflow
  );

endmodule
