// tb_range_fft_buffer: self-checking testbench of range_fft_buffer
// (RANGE_BINS 16, NUM_CHIRPS 8).
// Frame 1: written with random gaps, each word tagged with its chirp and
// range bin; read out under random tready. Checks the transposed order
// (range bin outer, chirp inner), tlast every NUM_CHIRPS beats, wr_ready,
// frame_done and stability of a stalled beat. Writes during read-out must
// be dropped and set overflow. Frame 2: written back to back and read with
// tready held high: read-out must take RANGE_BINS*NUM_CHIRPS beats on
// consecutive cycles. A wrong wr_last must set wr_align_error.
module tb_range_fft_buffer;
  import radar_pkg::*;
  localparam int RB = 16, NC = 8;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic              wr_en, wr_last, wr_ready, wr_align_error, overflow;
  logic [CPLX_W-1:0] wr_data, m_axis_tdata;
  logic [RANGE_W-1:0] wr_range_index;
  logic [DOPP_W-1:0]  wr_chirp_index;
  logic              m_axis_tvalid, m_axis_tlast, m_axis_tready, frame_done;

  range_fft_buffer #(.RANGE_BINS(RB), .NUM_CHIRPS(NC)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] word(int f, int c, int r);
    return {8'(f), 8'(c), 16'(r * 3 + 1)};
  endfunction

  task automatic write_frame(input int f, input bit gaps);
    for (int c = 0; c < NC; c++)
      for (int r = 0; r < RB; r++) begin
        if (gaps) while ($urandom % 3 == 0) @(negedge clk) wr_en = 0;
        @(negedge clk);
        check(wr_ready, $sformatf("wr_ready during write f=%0d c=%0d r=%0d", f, c, r));
        wr_en = 1; wr_data = word(f, c, r); wr_last = (r == RB - 1);
      end
    @(negedge clk) wr_en = 0;
  endtask

  int beats, frame_done_cnt, first_beat_cyc, last_beat_cyc, cyc;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && frame_done) frame_done_cnt <= frame_done_cnt + 1;
  end

  task automatic read_frame(input int f, input bit random_ready, input bit poke_writes);
    int n;
    logic [31:0] held; logic held_v;
    n = 0; held_v = 0;
    while (n < RB * NC) begin
      @(negedge clk);
      if (held_v) check(m_axis_tvalid && m_axis_tdata == held, "stalled beat stays stable");
      held_v = 0;
      check(!wr_ready, "wr_ready low during read-out");
      // decide ready for the coming edge; a beat moves when valid && ready
      m_axis_tready = random_ready ? ($urandom % 3 != 0) : 1'b1;
      wr_en = poke_writes && (n == 5);
      wr_data = 32'hdead_beef; wr_last = 0;
      if (m_axis_tvalid && m_axis_tready) begin
        int r, c;
        r = n / NC; c = n % NC;
        check(m_axis_tdata == word(f, c, r),
              $sformatf("beat %0d: %h expected %h", n, m_axis_tdata, word(f, c, r)));
        check(m_axis_tlast == (c == NC - 1), $sformatf("tlast at beat %0d", n));
        if (n == 0) first_beat_cyc = cyc;
        last_beat_cyc = cyc;
        n++;
      end else if (m_axis_tvalid) begin
        held = m_axis_tdata; held_v = 1;
      end
    end
    beats = n;
    @(negedge clk);   // the last beat moves on the edge before this one
    m_axis_tready = 0;
    wr_en = 0;
    @(negedge clk);
  endtask

  initial begin
    wr_en = 0; wr_last = 0; wr_data = 0; m_axis_tready = 0;
    cyc = 0; frame_done_cnt = 0; beats = 0; first_beat_cyc = 0; last_beat_cyc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(wr_ready && !m_axis_tvalid, "idle after reset");
    write_frame(1, 1);
    check(!wr_align_error, "no align error with correct wr_last");
    read_frame(1, 1, 1);
    check(overflow, "write during read-out sets overflow");
    check(frame_done_cnt == 1, $sformatf("frame_done pulses %0d", frame_done_cnt));
    check(wr_ready, "back to writing after read-out");
    write_frame(2, 0);
    m_axis_tready = 1;
    read_frame(2, 0, 0);
    check(last_beat_cyc - first_beat_cyc == RB * NC - 1,
          $sformatf("full-rate read-out took %0d cycles for %0d beats", last_beat_cyc - first_beat_cyc + 1, RB * NC));
    check(frame_done_cnt == 2, "second frame_done");
    // misplaced wr_last
    @(negedge clk) begin wr_en = 1; wr_data = 0; wr_last = 1; end
    @(negedge clk) wr_en = 0;
    @(negedge clk);
    check(wr_align_error, "misplaced wr_last flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
