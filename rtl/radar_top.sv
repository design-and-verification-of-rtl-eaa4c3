// radar_top: FMCW range-Doppler processing chain with streaming peak
// detection.
//
// Data path, one sample per clock:
//   sample source -> [range FFT core] -> range_fft_buffer (corner turn)
//   -> [Doppler FFT core] -> magnitude_sq -> index_tagger
//   -> peak_detector_axis (threshold, local maximum, peak FIFO)
// The sample source is either the built-in sample_generator (src_sel = 1,
// one frame per gen_start pulse) or the external ADC stream (src_sel = 0).
// The two FFT cores are vendor IP outside this module: their AXI4-Stream
// configuration and data channels are brought out as rfft_* and dfft_*
// ports. Each core gets its configuration word from its own fft_config_ctrl
// after reset, and data reaches a core only after its configuration is
// done. The range FFT output is written into the frame buffer; a full frame
// (NUM_CHIRPS chirps of RANGE_BINS bins) is read out per range bin, all
// chirps of that bin, and becomes one Doppler FFT frame of NUM_CHIRPS
// samples. The Doppler output is reduced to Re^2+Im^2, tagged with its range
// and Doppler index and scanned as one linear stream for peaks; detected
// peaks {magnitude, range, Doppler} wait in the FIFO for fifo_rd_en.
//
// Frame protocol: the frame buffer holds one frame. A new frame may enter
// the range FFT once buf_wr_ready is high and the previous frame's
// buf_frame_done has pulsed (or after reset); samples that reach the buffer
// during read-out are dropped and raise buf_overflow.
//
// Status: rfft/dfft_config_done, buf_overflow, buf_align_error (range FFT
// tlast not at the last bin), tag_tlast_error (Doppler FFT tlast not at bin
// NUM_CHIRPS-1), fifo_overflow (peak dropped on a full FIFO), frames_seen.
//
// The chain, the sizes (1024 x 64, 16-bit samples, 32-bit magnitude) and the
// accelerator's threshold/FIFO interface follow the source; the source
// multiplexer, the frame protocol and the status flags are this design's.
module radar_top
  import radar_pkg::*;
#(
  parameter int unsigned RANGE_BINS  = radar_pkg::DEF_RANGE_BINS,
  parameter int unsigned NUM_CHIRPS  = radar_pkg::DEF_NUM_CHIRPS,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned NUM_TARGETS = 2,
  parameter int unsigned TGT_RANGE_BIN [NUM_TARGETS] = '{100, 285},
  parameter int unsigned TGT_DOPP_BIN  [NUM_TARGETS] = '{12, 40},
  parameter int unsigned TGT_AMP       [NUM_TARGETS] = '{8000, 6000}
) (
  input  logic                clk,
  input  logic                rst,
  // sample source
  input  logic                src_sel,          // 1: sample generator, 0: external
  input  logic                gen_start,
  output logic                gen_busy,
  input  logic [SAMPLE_W-1:0] ext_sample_real,
  input  logic [SAMPLE_W-1:0] ext_sample_imag,
  input  logic                ext_sample_valid,
  input  logic                ext_sample_last,
  output logic                ext_sample_ready,
  // range FFT core
  output logic                rfft_aresetn,
  output logic [15:0]         rfft_cfg_tdata,
  output logic                rfft_cfg_tvalid,
  input  logic                rfft_cfg_tready,
  output logic [CPLX_W-1:0]   rfft_s_tdata,
  output logic                rfft_s_tvalid,
  output logic                rfft_s_tlast,
  input  logic                rfft_s_tready,
  input  logic [CPLX_W-1:0]   rfft_m_tdata,
  input  logic                rfft_m_tvalid,
  input  logic                rfft_m_tlast,
  // Doppler FFT core
  output logic                dfft_aresetn,
  output logic [15:0]         dfft_cfg_tdata,
  output logic                dfft_cfg_tvalid,
  input  logic                dfft_cfg_tready,
  output logic [CPLX_W-1:0]   dfft_s_tdata,
  output logic                dfft_s_tvalid,
  output logic                dfft_s_tlast,
  input  logic                dfft_s_tready,
  input  logic [CPLX_W-1:0]   dfft_m_tdata,
  input  logic                dfft_m_tvalid,
  input  logic                dfft_m_tlast,
  // peak detector: threshold and FIFO read
  input  logic [MAG_W-1:0]    threshold_val,
  input  logic                threshold_load,
  input  logic                fifo_rd_en,
  output logic [PEAK_W-1:0]   fifo_dout,
  output logic                fifo_empty,
  output logic                fifo_full,
  output logic                fifo_overflow,
  // status
  output logic                rfft_config_done,
  output logic                dfft_config_done,
  output logic                buf_wr_ready,
  output logic                buf_frame_done,
  output logic                buf_overflow,
  output logic                buf_align_error,
  output logic                tag_tlast_error,
  output logic [15:0]         frames_seen
);

  // ---------------- sample source ----------------
  logic [CPLX_W-1:0] gen_tdata;
  logic              gen_tvalid, gen_tlast, gen_frame_last;
  logic              src_tvalid, src_tready;

  sample_generator #(
    .RANGE_BINS    (RANGE_BINS),
    .NUM_CHIRPS    (NUM_CHIRPS),
    .NUM_TARGETS   (NUM_TARGETS),
    .TGT_RANGE_BIN (TGT_RANGE_BIN),
    .TGT_DOPP_BIN  (TGT_DOPP_BIN),
    .TGT_AMP       (TGT_AMP)
  ) u_gen (
    .clk, .rst,
    .start         (gen_start && src_sel),
    .busy          (gen_busy),
    .m_axis_tdata  (gen_tdata),
    .m_axis_tvalid (gen_tvalid),
    .m_axis_tlast  (gen_tlast),
    .frame_last    (gen_frame_last),
    .m_axis_tready (src_sel && src_tready)
  );

  always_comb begin
    src_tvalid       = src_sel ? gen_tvalid : ext_sample_valid;
    rfft_s_tdata     = src_sel ? gen_tdata  : {ext_sample_imag, ext_sample_real};
    rfft_s_tlast     = src_sel ? gen_tlast  : ext_sample_last;
    ext_sample_ready = !src_sel && src_tready;
  end

  // ---------------- range FFT configuration ----------------
  fft_config_ctrl u_rfft_cfg (
    .clk, .rst,
    .aresetn     (rfft_aresetn),
    .cfg_tdata   (rfft_cfg_tdata),
    .cfg_tvalid  (rfft_cfg_tvalid),
    .cfg_tready  (rfft_cfg_tready),
    .config_done (rfft_config_done),
    .src_tvalid  (src_tvalid),
    .src_tready  (src_tready),
    .core_tvalid (rfft_s_tvalid),
    .core_tready (rfft_s_tready)
  );

  // ---------------- corner-turn buffer ----------------
  logic [CPLX_W-1:0]  buf_tdata;
  logic               buf_tvalid, buf_tlast, buf_tready;
  logic [RANGE_W-1:0] buf_wr_range;
  logic [DOPP_W-1:0]  buf_wr_chirp;

  range_fft_buffer #(
    .RANGE_BINS (RANGE_BINS),
    .NUM_CHIRPS (NUM_CHIRPS)
  ) u_buf (
    .clk, .rst,
    .wr_en          (rfft_m_tvalid),
    .wr_data        (rfft_m_tdata),
    .wr_last        (rfft_m_tlast),
    .wr_ready       (buf_wr_ready),
    .wr_align_error (buf_align_error),
    .overflow       (buf_overflow),
    .wr_range_index (buf_wr_range),
    .wr_chirp_index (buf_wr_chirp),
    .m_axis_tdata   (buf_tdata),
    .m_axis_tvalid  (buf_tvalid),
    .m_axis_tlast   (buf_tlast),
    .m_axis_tready  (buf_tready),
    .frame_done     (buf_frame_done)
  );

  // ---------------- Doppler FFT configuration ----------------
  fft_config_ctrl u_dfft_cfg (
    .clk, .rst,
    .aresetn     (dfft_aresetn),
    .cfg_tdata   (dfft_cfg_tdata),
    .cfg_tvalid  (dfft_cfg_tvalid),
    .cfg_tready  (dfft_cfg_tready),
    .config_done (dfft_config_done),
    .src_tvalid  (buf_tvalid),
    .src_tready  (buf_tready),
    .core_tvalid (dfft_s_tvalid),
    .core_tready (dfft_s_tready)
  );

  always_comb begin
    dfft_s_tdata = buf_tdata;
    dfft_s_tlast = buf_tlast;
  end

  // ---------------- magnitude, indices, peak detection ----------------
  logic             mag_valid, mag_last;
  logic [MAG_W-1:0] mag;

  magnitude_sq u_mag (
    .clk, .rst,
    .s_valid (dfft_m_tvalid),
    .s_last  (dfft_m_tlast),
    .s_data  (dfft_m_tdata),
    .m_valid (mag_valid),
    .m_last  (mag_last),
    .m_mag   (mag)
  );

  logic [PEAK_W-1:0] pd_tdata;
  logic              pd_tvalid, pd_tlast, pd_tready;

  index_tagger #(
    .RANGE_BINS (RANGE_BINS),
    .NUM_CHIRPS (NUM_CHIRPS)
  ) u_tag (
    .clk, .rst,
    .s_valid       (mag_valid),
    .s_last        (mag_last),
    .s_mag         (mag),
    .m_axis_tdata  (pd_tdata),
    .m_axis_tvalid (pd_tvalid),
    .m_axis_tlast  (pd_tlast),
    .tlast_error   (tag_tlast_error)
  );

  peak_detector_axis #(.FIFO_DEPTH(FIFO_DEPTH)) u_pd (
    .clk, .rst,
    .s_axis_tdata   (pd_tdata),
    .s_axis_tvalid  (pd_tvalid),
    .s_axis_tlast   (pd_tlast),
    .s_axis_tready  (pd_tready),
    .threshold_val,
    .threshold_load,
    .fifo_rd_en,
    .fifo_dout,
    .fifo_empty,
    .fifo_full,
    .fifo_overflow,
    .frames_seen
  );

endmodule
