// peak_detector_core: streaming peak detection core.
//
// Chain of three parts, one sample per clock, never stalling:
//   1. pd_threshold_reg - programmable threshold register and compare;
//   2. pd_local_max     - prev/curr/next window, peak = above threshold and
//                         strictly greater than both neighbours;
//   3. target_fifo      - stores each peak as {magnitude, range, Doppler}
//                         (48 bits), read through fifo_rd_en / fifo_dout.
// The range and Doppler indices travel with each magnitude through all
// stages, so a stored peak carries its own coordinates.
//
// Interface: valid_in qualifies {mag_in, range_in, doppler_in}; the threshold
// is written with threshold_val + threshold_load. The FIFO read port is
// registered (data one cycle after fifo_rd_en). fifo_overflow is a sticky
// flag set when a peak was dropped because the FIFO was full.
// Latency: a peak is written into the FIFO (and fifo_empty falls) on the
// 4th clock edge after the sample that follows it is presented on valid_in.
//
// The port list follows the source's core (same widths: 32-bit magnitude and
// threshold, 10-bit range, 6-bit Doppler, 48-bit FIFO word); fifo_overflow
// and the FIFO depth are this design's additions.
module peak_detector_core
  import radar_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               valid_in,
  input  logic [MAG_W-1:0]   mag_in,
  input  logic [RANGE_W-1:0] range_in,
  input  logic [DOPP_W-1:0]  doppler_in,
  input  logic [MAG_W-1:0]   threshold_val,
  input  logic               threshold_load,
  input  logic               fifo_rd_en,
  output logic [PEAK_W-1:0]  fifo_dout,
  output logic               fifo_empty,
  output logic               fifo_full,
  output logic               fifo_overflow
);

  peak_t sample_in;
  always_comb begin
    sample_in.mag         = mag_in;
    sample_in.range_idx   = range_in;
    sample_in.doppler_idx = doppler_in;
  end

  logic             th_valid, th_above;
  peak_t            th_sample;
  logic [MAG_W-1:0] threshold_q;

  pd_threshold_reg u_threshold (
    .clk, .rst,
    .threshold_val, .threshold_load,
    .valid_in,
    .sample_in,
    .threshold_q,
    .valid_out  (th_valid),
    .sample_out (th_sample),
    .above_out  (th_above)
  );

  logic  pk_valid;
  peak_t pk;

  pd_local_max u_local_max (
    .clk, .rst,
    .valid_in   (th_valid),
    .sample_in  (th_sample),
    .above_in   (th_above),
    .peak_valid (pk_valid),
    .peak       (pk)
  );

  logic [$clog2(FIFO_DEPTH):0] fifo_count;

  target_fifo #(.WIDTH(PEAK_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en    (pk_valid),
    .din      (pk),
    .rd_en    (fifo_rd_en),
    .dout     (fifo_dout),
    .empty    (fifo_empty),
    .full     (fifo_full),
    .overflow (fifo_overflow),
    .count    (fifo_count)
  );

endmodule
