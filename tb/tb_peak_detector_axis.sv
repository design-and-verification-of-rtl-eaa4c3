// tb_peak_detector_axis: self-checking testbench of peak_detector_axis.
// Sends AXI4-Stream beats {mag, range, Doppler} one per clock with tlast at
// frame ends, for two frames each holding known peaks, and checks: tready
// stays high (no stall), the peaks read from the FIFO with their indices,
// the frame counter, and the latency from the successor beat to fifo_empty
// falling (5 cycles: interface stage + core).
module tb_peak_detector_axis;
  import radar_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [PEAK_W-1:0] s_axis_tdata, fifo_dout;
  logic              s_axis_tvalid, s_axis_tlast, s_axis_tready;
  logic [MAG_W-1:0]  threshold_val;
  logic              threshold_load, fifo_rd_en, fifo_empty, fifo_full, fifo_overflow;
  logic [15:0]       frames_seen;

  peak_detector_axis dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  peak_t got [$];
  logic  rd_d;
  always @(posedge clk) begin
    rd_d <= fifo_rd_en && !fifo_empty && !rst;
    if (rd_d) got.push_back(peak_t'(fifo_dout));
  end

  int stalls = 0;
  always @(posedge clk) if (!rst && s_axis_tvalid && !s_axis_tready) stalls++;

  localparam int FR = 4, FD = 8;  // frame: 4 range bins x 8 Doppler bins

  function automatic logic [MAG_W-1:0] mag_of(int f, int r, int d);
    // background 1000 + small ripple; peaks at (1,3) and (2,6) in frame 0,
    // (3,1) in frame 1; a below-threshold local maximum at (0,4)
    if (f == 0 && r == 1 && d == 3) return 900000;
    if (f == 0 && r == 2 && d == 6) return 500000;
    if (f == 1 && r == 3 && d == 1) return 700000;
    if (r == 0 && d == 4) return 40000;
    return 32'(1000 + ((r * 7 + d * 3) % 5));
  endfunction

  initial begin
    int t_first_succ, t_empty;
    s_axis_tdata = '0; s_axis_tvalid = 0; s_axis_tlast = 0;
    threshold_val = 0; threshold_load = 0; fifo_rd_en = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) begin threshold_val = 32'd100000; threshold_load = 1; end
    @(negedge clk) threshold_load = 0;
    check(s_axis_tready, "tready high after reset");
    t_first_succ = -1; t_empty = -1;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < FR; r++)
        for (int d = 0; d < FD; d++) begin
          peak_t b;
          @(negedge clk);
          if (t_first_succ >= 0) t_first_succ++;
          if (t_empty < 0 && !fifo_empty && t_first_succ >= 0) t_empty = t_first_succ;
          b.mag = mag_of(f, r, d); b.range_idx = RANGE_W'(r); b.doppler_idx = DOPP_W'(d);
          s_axis_tdata = b; s_axis_tvalid = 1;
          s_axis_tlast = (r == FR - 1) && (d == FD - 1);
          if (f == 0 && r == 1 && d == 4) t_first_succ = 0;
        end
    @(negedge clk) begin s_axis_tvalid = 0; s_axis_tlast = 0; end
    repeat (8) @(negedge clk);
    check(t_empty == 5, $sformatf("latency successor->fifo_empty low %0d, expected 5", t_empty));
    check(stalls == 0, "no stall");
    check(frames_seen == 16'd2, $sformatf("frames_seen %0d", frames_seen));
    repeat (5) @(negedge clk) fifo_rd_en = 1;
    @(negedge clk) fifo_rd_en = 0;
    @(negedge clk);
    check(got.size() == 3, $sformatf("%0d peaks", got.size()));
    if (got.size() == 3) begin
      check(got[0] == {32'd900000, 10'd1, 6'd3}, $sformatf("peak0 %h", got[0]));
      check(got[1] == {32'd500000, 10'd2, 6'd6}, $sformatf("peak1 %h", got[1]));
      check(got[2] == {32'd700000, 10'd3, 6'd1}, $sformatf("peak2 %h", got[2]));
    end
    check(!fifo_overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
