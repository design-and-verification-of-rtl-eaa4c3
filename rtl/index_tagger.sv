// index_tagger: attaches range and Doppler indices to the magnitude stream.
//
// The Doppler FFT emits, for each range bin in turn, NUM_CHIRPS Doppler
// bins, each burst closed by last. This block counts the bins: the Doppler
// index advances on every valid sample and restarts after last (or after
// NUM_CHIRPS samples if last is missing); the range index advances with
// each burst and wraps after RANGE_BINS bursts. Each sample leaves as one
// AXI4-Stream beat {magnitude, range index, Doppler index}, with tlast on the
// final bin of the frame, so the peak detector needs no 2-D addressing.
// tlast_error is a sticky flag raised when last arrives at a Doppler index
// other than NUM_CHIRPS-1.
//
// Timing: one register stage, one beat per clock, no backpressure.
// The source states that indices travel with the magnitudes; the counting
// scheme, the tlast resync and the error flag are this design's choices.
module index_tagger
  import radar_pkg::*;
#(
  parameter int unsigned RANGE_BINS = radar_pkg::DEF_RANGE_BINS,
  parameter int unsigned NUM_CHIRPS = radar_pkg::DEF_NUM_CHIRPS
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              s_valid,
  input  logic              s_last,
  input  logic [MAG_W-1:0]  s_mag,
  output logic [PEAK_W-1:0] m_axis_tdata,
  output logic              m_axis_tvalid,
  output logic              m_axis_tlast,
  output logic              tlast_error
);

  logic [RANGE_W-1:0] range_cnt;
  logic [DOPP_W-1:0]  dopp_cnt;

  logic burst_end, frame_end;
  always_comb begin
    burst_end = s_last || (dopp_cnt == DOPP_W'(NUM_CHIRPS - 1));
    frame_end = burst_end && (range_cnt == RANGE_W'(RANGE_BINS - 1));
  end

  peak_t beat;
  always_comb begin
    beat.mag         = s_mag;
    beat.range_idx   = range_cnt;
    beat.doppler_idx = dopp_cnt;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      range_cnt     <= '0;
      dopp_cnt      <= '0;
      m_axis_tdata  <= '0;
      m_axis_tvalid <= 1'b0;
      m_axis_tlast  <= 1'b0;
      tlast_error   <= 1'b0;
    end else begin
      m_axis_tvalid <= s_valid;
      if (s_valid) begin
        m_axis_tdata <= beat;
        m_axis_tlast <= frame_end;
        if (s_last != (dopp_cnt == DOPP_W'(NUM_CHIRPS - 1))) tlast_error <= 1'b1;
        if (burst_end) begin
          dopp_cnt  <= '0;
          range_cnt <= frame_end ? '0 : range_cnt + 1'b1;
        end else begin
          dopp_cnt  <= dopp_cnt + 1'b1;
        end
      end
    end
  end

endmodule
