// tb_radar_top_full: one complete frame through radar_top at its default
// size (1024 range bins x 64 chirps, default targets (range 100, Doppler 12,
// amplitude 8000) and (285, 40, 6000)), with behavioural FFT cores.
// Threshold 1e6, FIFO read continuously. Checks: exactly the two targets
// are detected with their indices and squared magnitudes (amplitude^2
// within 3 %), the corner-turn read-out takes 1024*64+1 cycles, one frame is
// counted by buffer and detector, no tlast misalignment, no overflow.
// Prints the cycle counts from the first sample to the read-out's end and
// to the last detector input.
module tb_radar_top_full;
  import radar_pkg::*;
  localparam int RB = 1024, NC = 64;

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

  radar_top dut (.*);

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
    repeat (400000) @(posedge clk);
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
  int    cyc, t_first_in, t_last_wr, t_done, t_last_pd, n_tlast_ev;
  always @(posedge clk) begin
    if (rst) begin
      rd_d <= 0; cyc <= 0; t_first_in <= -1; t_last_wr <= 0; t_done <= 0; t_last_pd <= 0;
      n_tlast_ev <= 0;
    end else begin
      cyc <= cyc + 1;
      rd_d <= fifo_rd_en && !fifo_empty;
      if (rd_d) got.push_back(peak_t'(fifo_dout));
      if (rfft_s_tvalid && rfft_s_tready && t_first_in < 0) t_first_in <= cyc;
      if (dut.u_buf.wr_ready && dut.u_buf.do_wr && dut.u_buf.wr_addr == 16'(RB * NC - 1)) t_last_wr <= cyc;
      if (buf_frame_done) t_done <= cyc;
      if (dut.pd_tvalid && dut.pd_tlast) t_last_pd <= cyc;
      if (ev[1] || ev[2] || ev[4] || ev[5]) n_tlast_ev <= n_tlast_ev + 1;
    end
  end

  initial begin
    int unsigned kr [2] = '{100, 285};
    int unsigned kd [2] = '{12, 40};
    int unsigned am [2] = '{8000, 6000};
    src_sel = 1; gen_start = 0; ext_sample_real = 0; ext_sample_imag = 0;
    ext_sample_valid = 0; ext_sample_last = 0; threshold_val = 0; threshold_load = 0;
    fifo_rd_en = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (4) @(negedge clk);
    check(rfft_config_done && dfft_config_done, "FFT cores configured");
    @(negedge clk) begin threshold_val = 32'd1000000; threshold_load = 1; end
    @(negedge clk) begin threshold_load = 0; gen_start = 1; end
    @(negedge clk) begin gen_start = 0; fifo_rd_en = 1; end
    while (frames_seen == 16'd0) @(negedge clk);
    repeat (10) @(negedge clk);
    fifo_rd_en = 0;
    @(negedge clk);
    check(got.size() == 2, $sformatf("%0d peaks detected, expected 2", got.size()));
    for (int i = 0; i < got.size() && i < 2; i++) begin
      real m, e;
      m = real'(got[i].mag); e = real'(am[i]) * real'(am[i]);
      check(got[i].range_idx == RANGE_W'(kr[i]) && got[i].doppler_idx == DOPP_W'(kd[i]),
            $sformatf("peak %0d at (%0d,%0d)", i, got[i].range_idx, got[i].doppler_idx));
      check(m > 0.97 * e && m < 1.03 * e, $sformatf("peak %0d magnitude %0d", i, got[i].mag));
      $display("peak %0d: range %0d doppler %0d magnitude %0d", i, got[i].range_idx, got[i].doppler_idx, got[i].mag);
    end
    check(t_done - t_last_wr == RB * NC + 2, $sformatf("read-out %0d cycles", t_done - t_last_wr - 1));
    check(frames_seen == 16'd1, "one detector frame");
    check(!buf_overflow && !fifo_overflow, "no overflow");
    check(!buf_align_error && !tag_tlast_error && n_tlast_ev == 0, "no tlast misalignment");
    $display("cycles: first sample -> read-out done %0d, -> last detector input %0d",
             t_done - t_first_in, t_last_pd - t_first_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
