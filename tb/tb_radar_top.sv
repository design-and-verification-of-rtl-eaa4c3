// tb_radar_top: end-to-end testbench of radar_top at reduced size
// (64 range bins x 16 chirps, peak FIFO depth 2), with behavioural FFT cores.
//
// Targets (range bin, Doppler bin, amplitude): T0 (5,3,8000),
// T1 (20,10,6000), T2 (20,11,3000), T3 (40,14,5000). T2 sits next to the
// stronger T1 in the same range bin, so it passes the threshold but is not a
// local maximum. Expected squared magnitude of a target is amplitude^2.
//   Frame 1: threshold 1e6, FIFO read continuously -> T0, T1, T3.
//   Frame 2: FIFO not read until the frame is done -> FIFO full, T0 and T1
//            kept, T3 dropped, fifo_overflow set.
//   Frame 3: threshold reloaded to 3e7 -> T0, T1 only. During its read-out
//            one chirp is pushed from the external input, which the buffer
//            must drop (buf_overflow).
// Also checks the FFT configuration handshakes, the corner-turn read-out
// time (RANGE_BINS*NUM_CHIRPS+1 cycles), frame counters and that no tlast
// misalignment is flagged. Each mechanism is counted and must occur.
module tb_radar_top;
  import radar_pkg::*;
  localparam int RB = 64, NC = 16, NT = 4;
  localparam int unsigned KR [NT] = '{5, 20, 20, 40};
  localparam int unsigned KD [NT] = '{3, 10, 11, 14};
  localparam int unsigned AM [NT] = '{8000, 6000, 3000, 5000};

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

  radar_top #(.RANGE_BINS(RB), .NUM_CHIRPS(NC), .FIFO_DEPTH(2), .NUM_TARGETS(NT),
              .TGT_RANGE_BIN(KR), .TGT_DOPP_BIN(KD), .TGT_AMP(AM)) dut (.*);

  logic ev_unused [6];
  xfft_model #(.NFFT(RB)) u_rfft (
    .aclk(clk), .aresetn(rfft_aresetn),
    .s_axis_config_tdata(rfft_cfg_tdata), .s_axis_config_tvalid(rfft_cfg_tvalid),
    .s_axis_config_tready(rfft_cfg_tready),
    .s_axis_data_tdata(rfft_s_tdata), .s_axis_data_tvalid(rfft_s_tvalid),
    .s_axis_data_tlast(rfft_s_tlast), .s_axis_data_tready(rfft_s_tready),
    .m_axis_data_tdata(rfft_m_tdata), .m_axis_data_tvalid(rfft_m_tvalid),
    .m_axis_data_tlast(rfft_m_tlast),
    .event_frame_started(ev_unused[0]), .event_tlast_unexpected(ev_unused[1]),
    .event_tlast_missing(ev_unused[2]));
  xfft_model #(.NFFT(NC)) u_dfft (
    .aclk(clk), .aresetn(dfft_aresetn),
    .s_axis_config_tdata(dfft_cfg_tdata), .s_axis_config_tvalid(dfft_cfg_tvalid),
    .s_axis_config_tready(dfft_cfg_tready),
    .s_axis_data_tdata(dfft_s_tdata), .s_axis_data_tvalid(dfft_s_tvalid),
    .s_axis_data_tlast(dfft_s_tlast), .s_axis_data_tready(dfft_s_tready),
    .m_axis_data_tdata(dfft_m_tdata), .m_axis_data_tvalid(dfft_m_tvalid),
    .m_axis_data_tlast(dfft_m_tlast),
    .event_frame_started(ev_unused[3]), .event_tlast_unexpected(ev_unused[4]),
    .event_tlast_missing(ev_unused[5]));

  int checks = 0, failures = 0;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------- monitors and mechanism counters ----------------
  peak_t got [$];
  logic  rd_d;
  int    n_cfg_hs, n_frame_done, n_below, n_above_not_peak, n_peaks, n_fifo_reads;
  int    n_fifo_drop, n_buf_drop, n_thr_load, n_ext_beats, n_rfft_tlast_ev;
  int    cyc, t_read_start, t_read_end;
  always @(posedge clk) begin
    if (rst) begin
      rd_d <= 0; n_cfg_hs <= 0; n_frame_done <= 0; n_below <= 0; n_above_not_peak <= 0;
      n_peaks <= 0; n_fifo_reads <= 0; n_fifo_drop <= 0; n_buf_drop <= 0; n_thr_load <= 0;
      n_ext_beats <= 0; n_rfft_tlast_ev <= 0; cyc <= 0; t_read_start <= 0; t_read_end <= 0;
    end else begin
      cyc <= cyc + 1;
      rd_d <= fifo_rd_en && !fifo_empty;
      if (rd_d) begin got.push_back(peak_t'(fifo_dout)); n_fifo_reads <= n_fifo_reads + 1; end
      n_cfg_hs <= n_cfg_hs + int'(rfft_cfg_tvalid && rfft_cfg_tready)
                           + int'(dfft_cfg_tvalid && dfft_cfg_tready);
      if (buf_frame_done) begin n_frame_done <= n_frame_done + 1; t_read_end <= cyc; end
      if (dut.u_buf.wr_ready && dut.u_buf.do_wr &&
          dut.u_buf.wr_addr == 16'(RB * NC - 1)) t_read_start <= cyc;
      if (dut.u_pd.u_core.th_valid && !dut.u_pd.u_core.th_above) n_below <= n_below + 1;
      if (dut.u_pd.u_core.u_local_max.shifted && dut.u_pd.u_core.u_local_max.above_curr &&
          dut.u_pd.u_core.u_local_max.fill == 2 && !dut.u_pd.u_core.u_local_max.is_peak)
        n_above_not_peak <= n_above_not_peak + 1;
      if (dut.u_pd.u_core.pk_valid) n_peaks <= n_peaks + 1;
      if (dut.u_pd.u_core.pk_valid && fifo_full) n_fifo_drop <= n_fifo_drop + 1;
      if (rfft_m_tvalid && !buf_wr_ready) n_buf_drop <= n_buf_drop + 1;
      if (threshold_load) n_thr_load <= n_thr_load + 1;
      if (ext_sample_valid && ext_sample_ready) n_ext_beats <= n_ext_beats + 1;
      if (ev_unused[1] || ev_unused[2] || ev_unused[4] || ev_unused[5])
        n_rfft_tlast_ev <= n_rfft_tlast_ev + 1;
    end
  end

  task automatic set_threshold(input logic [MAG_W-1:0] t);
    @(negedge clk) begin threshold_val = t; threshold_load = 1; end
    @(negedge clk) threshold_load = 0;
  endtask

  task automatic run_frame(input bit read_live);
    int fs;
    fs = frames_seen;
    @(negedge clk) begin src_sel = 1; gen_start = 1; end
    @(negedge clk) gen_start = 0;
    fifo_rd_en = read_live;
    while (frames_seen == 16'(fs)) @(negedge clk);
    repeat (10) @(negedge clk);
    fifo_rd_en = 0;
    @(negedge clk);
  endtask

  task automatic expect_peaks(input int idx [$], input string tag);
    check(got.size() == idx.size(), $sformatf("%s: %0d peaks, expected %0d", tag, got.size(), idx.size()));
    for (int i = 0; i < got.size() && i < idx.size(); i++) begin
      int t; real m, e;
      t = idx[i];
      m = real'(got[i].mag); e = real'(AM[t]) * real'(AM[t]);
      check(got[i].range_idx == RANGE_W'(KR[t]) && got[i].doppler_idx == DOPP_W'(KD[t]),
            $sformatf("%s: peak %0d at (%0d,%0d), expected (%0d,%0d)", tag, i,
                      got[i].range_idx, got[i].doppler_idx, KR[t], KD[t]));
      check(m > 0.97 * e && m < 1.03 * e,
            $sformatf("%s: peak %0d magnitude %0d, expected about %0d", tag, i, got[i].mag, AM[t] * AM[t]));
    end
    got.delete();
  endtask

  initial begin
    src_sel = 1; gen_start = 0; ext_sample_real = 0; ext_sample_imag = 0;
    ext_sample_valid = 0; ext_sample_last = 0; threshold_val = 0; threshold_load = 0;
    fifo_rd_en = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (4) @(negedge clk);
    check(rfft_config_done && dfft_config_done, "both FFT cores configured");
    check(rfft_cfg_tdata == 16'h0001 && dfft_cfg_tdata == 16'h0001, "configuration word");

    // ---- frame 1 ----
    set_threshold(32'd1000000);
    run_frame(1);
    expect_peaks('{0, 1, 3}, "frame 1");
    // frame_done is set RB*NC+1 edges after the edge that stores the last
    // word, and is seen by the monitor one edge later
    check(t_read_end - t_read_start == RB * NC + 2,
          $sformatf("read-out took %0d cycles, expected %0d", t_read_end - t_read_start - 1, RB * NC + 1));
    check(!fifo_overflow, "frame 1: no FIFO overflow");

    // ---- frame 2: FIFO not read ----
    run_frame(0);
    check(fifo_full && fifo_overflow, "frame 2: FIFO full and overflow flagged");
    repeat (3) @(negedge clk) fifo_rd_en = 1;
    @(negedge clk) fifo_rd_en = 0;
    repeat (2) @(negedge clk);
    expect_peaks('{0, 1}, "frame 2");

    // ---- frame 3: higher threshold, external chirp during read-out ----
    set_threshold(32'd30000000);
    fork
      run_frame(1);
      begin
        wait (!buf_wr_ready);
        @(negedge clk) src_sel = 0;
        for (int n = 0; n < RB; n++) begin
          ext_sample_real = 16'(n * 37); ext_sample_imag = 16'(n * 11);
          ext_sample_valid = 1; ext_sample_last = (n == RB - 1);
          @(negedge clk);
          while (!ext_sample_ready) @(negedge clk);
        end
        ext_sample_valid = 0; ext_sample_last = 0;
      end
    join
    expect_peaks('{0, 1}, "frame 3");
    check(buf_overflow, "frame 3: buffer overflow flagged for samples during read-out");

    // ---- counters ----
    check(frames_seen == 16'd3 && n_frame_done == 3, $sformatf("frames: %0d detector, %0d buffer", frames_seen, n_frame_done));
    check(!buf_align_error && !tag_tlast_error && n_rfft_tlast_ev == 0, "no tlast misalignment");
    check(n_cfg_hs == 2,        $sformatf("configuration handshakes: %0d", n_cfg_hs));
    check(n_below > 0,          "mechanism: samples rejected by threshold");
    check(n_above_not_peak > 0, "mechanism: above-threshold sample rejected by local maximum");
    check(n_peaks > 0,          "mechanism: peaks detected");
    check(n_fifo_reads > 0,     "mechanism: FIFO reads");
    check(n_fifo_drop > 0,      "mechanism: peak dropped on full FIFO");
    check(n_buf_drop > 0,       "mechanism: range FFT output dropped during read-out");
    check(n_thr_load >= 2,      "mechanism: threshold reload");
    check(n_ext_beats == RB,    "mechanism: external sample source");
    $display("mechanisms: cfg=%0d below=%0d above_not_peak=%0d peaks=%0d reads=%0d fifo_drop=%0d buf_drop=%0d thr_load=%0d ext=%0d",
             n_cfg_hs, n_below, n_above_not_peak, n_peaks, n_fifo_reads, n_fifo_drop, n_buf_drop, n_thr_load, n_ext_beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
