// tb_sample_generator: self-checking testbench of sample_generator
// (RANGE_BINS 64, NUM_CHIRPS 8, two targets). Every accepted sample is
// compared with amplitude * exp(j*2*pi*(kr*n/RANGE_BINS + kd*c/NUM_CHIRPS))
// summed over the targets, computed here in floating point (tolerance 3
// LSB). Also checks tlast at chirp ends, frame_last, the sample count of a
// frame under random tready, busy, and that the source is idle between
// frames until the next start.
module tb_sample_generator;
  import radar_pkg::*;
  localparam int RB = 64, NC = 8;
  localparam int unsigned KR [2] = '{5, 40};
  localparam int unsigned KD [2] = '{3, 6};
  localparam int unsigned AM [2] = '{10000, 7000};

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic              start, busy, m_axis_tvalid, m_axis_tlast, frame_last, m_axis_tready;
  logic [CPLX_W-1:0] m_axis_tdata;

  sample_generator #(.RANGE_BINS(RB), .NUM_CHIRPS(NC), .NUM_TARGETS(2),
                     .TGT_RANGE_BIN(KR), .TGT_DOPP_BIN(KD), .TGT_AMP(AM)) dut (.*);

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

  initial begin
    int n;
    real pi = 3.14159265358979323846;
    start = 0; m_axis_tready = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk);
    check(!busy && !m_axis_tvalid, "idle before start");
    for (int f = 0; f < 2; f++) begin
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      n = 0;
      while (n < RB * NC) begin
        m_axis_tready = (f == 0) ? ($urandom % 4 != 0) : 1'b1;
        #1;
        if (m_axis_tvalid && m_axis_tready) begin
          int c, s;
          real er, ei;
          c = n / RB; s = n % RB;
          er = 0.0; ei = 0.0;
          for (int t = 0; t < 2; t++) begin
            real ph;
            ph = 2.0 * pi * (real'(KR[t] * s) / real'(RB) + real'(KD[t] * c) / real'(NC));
            er += real'(AM[t]) * $cos(ph);
            ei += real'(AM[t]) * $sin(ph);
          end
          begin
            real dr, di;
            dr = real'($signed(m_axis_tdata[15:0])) - er;
            di = real'($signed(m_axis_tdata[31:16])) - ei;
            check(dr < 3.0 && dr > -3.0 && di < 3.0 && di > -3.0,
                  $sformatf("sample c=%0d n=%0d got (%0d,%0d) expected (%f,%f)", c, s,
                            $signed(m_axis_tdata[15:0]), $signed(m_axis_tdata[31:16]), er, ei));
          end
          check(m_axis_tlast == (s == RB - 1), "tlast at chirp end");
          check(frame_last == (n == RB * NC - 1), "frame_last at frame end");
          n++;
        end
        @(negedge clk);
      end
      check(!busy && !m_axis_tvalid, "idle after one frame");
      repeat (5) @(negedge clk) check(!m_axis_tvalid, "no samples until next start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
