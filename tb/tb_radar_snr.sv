// tb_radar_snr: detection across signal-to-noise ratios, through the whole
// radar_top chain (128 range bins x 32 chirps) with behavioural FFT cores.
//
// Frames are fed through the external sample input: three targets
// (range 10 / Doppler 5 / amplitude 1200, 70/20/1000, 100/25/1500) plus
// Gaussian noise (sum of 12 uniform draws) of standard deviation 500, 2000
// and 4000 LSB per component, i.e. per-sample SNR of the weakest target of
// +3, -9 and -15 dB. The two FFTs give 10*log10(128*32) = 36 dB of
// processing gain, so with a threshold of 2e5 (target magnitude ~1e6,
// noise-bin mean ~2*sigma^2/4096) every target must be found at its exact
// indices and no noise bin may be reported. Each frame waits for the
// buffer's frame_done before the next one starts.
module tb_radar_snr;
  import radar_pkg::*;
  localparam int RB = 128, NC = 32, NT = 3;
  localparam int KR [NT] = '{10, 70, 100};
  localparam int KD [NT] = '{5, 20, 25};
  localparam int AM [NT] = '{1200, 1000, 1500};
  localparam int SIGMA [3] = '{500, 2000, 4000};

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic                src_sel, gen_start, gen_busy;
  logic [SAMPLE_W-1:0] ext_sample_real, ext_sample_imag;
  logic                ext_sample_valid, ext_sample_last, ext_sample_ready;
  logic                rfft_aresetn, rfft_cfg_tvalid, rfft_cfg_tready;
  logic [15:0]         rfft_cfg_tdata;
  logic [CPLX_W-1:0]   rfft_s_tdata, rfft_m_tdata;
  logic                rfft_s_tvalid, rfft_s_tlast, rfft_s_tready, rfft_m_tvalid, rfft_m_tlast;
  logic                dfft_aresetn, dfft_cfg_tvalid, dfft_cfg_tready;
  logic [15:0]         dfft_cfg_tdata;
  logic [CPLX_W-1:0]   dfft_s_tdata, dfft_m_tdata;
  logic                dfft_s_tvalid, dfft_s_tlast, dfft_s_tready, dfft_m_tvalid, dfft_m_tlast;
  logic [MAG_W-1:0]    threshold_val;
  logic                threshold_load, fifo_rd_en;
  logic [PEAK_W-1:0]   fifo_dout;
  logic                fifo_empty, fifo_full, fifo_overflow;
  logic                rfft_config_done, dfft_config_done, buf_wr_ready, buf_frame_done;
  logic                buf_overflow, buf_align_error, tag_tlast_error;
  logic [15:0]         frames_seen;

  radar_top #(.RANGE_BINS(RB), .NUM_CHIRPS(NC)) dut (.*);

  logic ev [6];
  xfft_model #(.NFFT(RB)) u_rfft (
    .aclk(clk), .aresetn(rfft_aresetn),
    .s_axis_config_tdata(rfft_cfg_tdata), .s_axis_config_tvalid(rfft_cfg_tvalid),
    .s_axis_config_tready(rfft_cfg_tready),
    .s_axis_data_tdata(rfft_s_tdata), .s_axis_data_tvalid(rfft_s_tvalid),
    .s_axis_data_tlast(rfft_s_tlast), .s_axis_data_tready(rfft_s_tready),
    .m_axis_data_tdata(rfft_m_tdata), .m_axis_data_tvalid(rfft_m_tvalid),
    .m_axis_data_tlast(rfft_m_tlast),
    .event_frame_started(ev[0]), .event_tlast_unexpected(ev[1]), .event_tlast_missing(ev[2]));
  xfft_model #(.NFFT(NC)) u_dfft (
    .aclk(clk), .aresetn(dfft_aresetn),
    .s_axis_config_tdata(dfft_cfg_tdata), .s_axis_config_tvalid(dfft_cfg_tvalid),
    .s_axis_config_tready(dfft_cfg_tready),
    .s_axis_data_tdata(dfft_s_tdata), .s_axis_data_tvalid(dfft_s_tvalid),
    .s_axis_data_tlast(dfft_s_tlast), .s_axis_data_tready(dfft_s_tready),
    .m_axis_data_tdata(dfft_m_tdata), .m_axis_data_tvalid(dfft_m_tvalid),
    .m_axis_data_tlast(dfft_m_tlast),
    .event_frame_started(ev[3]), .event_tlast_unexpected(ev[4]), .event_tlast_missing(ev[5]));

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  peak_t got [$];
  logic  rd_d;
  always @(posedge clk) begin
    if (rst) rd_d <= 0;
    else begin
      rd_d <= fifo_rd_en && !fifo_empty;
      if (rd_d) got.push_back(peak_t'(fifo_dout));
    end
  end

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 1000000) / 1000000.0;
    return s - 6.0;
  endfunction

  function automatic logic [15:0] sat(input real v);
    real r = (v >= 0.0) ? v + 0.5 : v - 0.5;
    if (r > 32767.0) r = 32767.0;
    if (r < -32768.0) r = -32768.0;
    return 16'($rtoi(r));
  endfunction

  initial begin
    real pi = 3.14159265358979323846;
    src_sel = 0; gen_start = 0; ext_sample_real = 0; ext_sample_imag = 0;
    ext_sample_valid = 0; ext_sample_last = 0; threshold_val = 0; threshold_load = 0;
    fifo_rd_en = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) begin threshold_val = 32'd200000; threshold_load = 1; end
    @(negedge clk) begin threshold_load = 0; fifo_rd_en = 1; end
    for (int lvl = 0; lvl < 3; lvl++) begin
      int fs;
      fs = frames_seen;
      for (int c = 0; c < NC; c++)
        for (int n = 0; n < RB; n++) begin
          real re, im;
          re = real'(SIGMA[lvl]) * gauss();
          im = real'(SIGMA[lvl]) * gauss();
          for (int t = 0; t < NT; t++) begin
            real ph;
            ph = 2.0 * pi * (real'(KR[t] * n) / real'(RB) + real'(KD[t] * c) / real'(NC));
            re += real'(AM[t]) * $cos(ph);
            im += real'(AM[t]) * $sin(ph);
          end
          ext_sample_real = sat(re); ext_sample_imag = sat(im);
          ext_sample_valid = 1; ext_sample_last = (n == RB - 1);
          @(negedge clk);
          while (!ext_sample_ready) @(negedge clk);
        end
      ext_sample_valid = 0; ext_sample_last = 0;
      while (frames_seen == 16'(fs)) @(negedge clk);
      repeat (10) @(negedge clk);
      // wait for the buffer to be free before the next frame
      while (!buf_wr_ready) @(negedge clk);
      check(got.size() == NT, $sformatf("sigma %0d: %0d detections, expected %0d", SIGMA[lvl], got.size(), NT));
      for (int i = 0; i < got.size() && i < NT; i++) begin
        real m, e;
        m = real'(got[i].mag); e = real'(AM[i]) * real'(AM[i]);
        check(int'(got[i].range_idx) == KR[i] && int'(got[i].doppler_idx) == KD[i],
              $sformatf("sigma %0d: detection %0d at (%0d,%0d), expected (%0d,%0d)", SIGMA[lvl], i,
                        got[i].range_idx, got[i].doppler_idx, KR[i], KD[i]));
        check(m > 0.5 * e && m < 2.0 * e,
              $sformatf("sigma %0d: detection %0d magnitude %0d", SIGMA[lvl], i, got[i].mag));
      end
      $display("sigma %0d: %0d detections", SIGMA[lvl], got.size());
      got.delete();
    end
    check(!buf_overflow && !fifo_overflow && !buf_align_error && !tag_tlast_error, "no flags raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
