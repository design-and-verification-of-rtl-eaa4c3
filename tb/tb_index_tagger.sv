// tb_index_tagger: self-checking testbench of index_tagger
// (RANGE_BINS 8, NUM_CHIRPS 4). Three frames of bursts with random gaps:
// checks range/Doppler indices, magnitude and tlast on the frame's last
// beat; then an early last mid-burst must set tlast_error and restart the
// Doppler count.
module tb_index_tagger;
  import radar_pkg::*;
  localparam int RB = 8, NC = 4;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic              s_valid, s_last, m_axis_tvalid, m_axis_tlast, tlast_error;
  logic [MAG_W-1:0]  s_mag;
  logic [PEAK_W-1:0] m_axis_tdata;

  index_tagger #(.RANGE_BINS(RB), .NUM_CHIRPS(NC)) dut (.*);

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

  peak_t exp_q [$];
  logic  exp_l [$];
  always @(negedge clk) if (!rst && m_axis_tvalid) begin
    peak_t e; logic l;
    if (exp_q.size() == 0) check(0, "unexpected beat");
    else begin
      e = exp_q.pop_front(); l = exp_l.pop_front();
      check(peak_t'(m_axis_tdata) == e && m_axis_tlast == l,
            $sformatf("beat %h last %b, expected %h last %b", m_axis_tdata, m_axis_tlast, e, l));
    end
  end

  initial begin
    s_valid = 0; s_last = 0; s_mag = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 3; f++)
      for (int r = 0; r < RB; r++)
        for (int d = 0; d < NC; d++) begin
          peak_t e;
          while ($urandom % 3 == 0) @(negedge clk) s_valid = 0;
          @(negedge clk);
          s_valid = 1; s_mag = $urandom; s_last = (d == NC - 1);
          e.mag = s_mag; e.range_idx = RANGE_W'(r); e.doppler_idx = DOPP_W'(d);
          exp_q.push_back(e); exp_l.push_back(r == RB - 1 && d == NC - 1);
        end
    @(negedge clk) s_valid = 0;
    repeat (3) @(negedge clk);
    check(!tlast_error, "no tlast error on aligned bursts");
    check(exp_q.size() == 0, "all beats seen");
    // early last after two samples of range bin 0
    for (int d = 0; d < 2; d++) begin
      peak_t e;
      @(negedge clk);
      s_valid = 1; s_mag = 32'(d); s_last = (d == 1);
      e.mag = s_mag; e.range_idx = 0; e.doppler_idx = DOPP_W'(d);
      exp_q.push_back(e); exp_l.push_back(0);
    end
    begin
      peak_t e;
      @(negedge clk);
      s_valid = 1; s_mag = 32'd77; s_last = 0;
      e.mag = 77; e.range_idx = 1; e.doppler_idx = 0;  // resynchronised
      exp_q.push_back(e); exp_l.push_back(0);
    end
    @(negedge clk) s_valid = 0;
    repeat (3) @(negedge clk);
    check(tlast_error, "tlast_error set by early last");
    check(exp_q.size() == 0, "all beats seen after resync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
