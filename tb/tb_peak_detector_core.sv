// tb_peak_detector_core: self-checking testbench of peak_detector_core.
// 1. A short directed stream (threshold 100000; magnitudes 50000, 120000,
//    200000, 130000, 60000 at range bins 10..14): exactly one peak,
//    {200000, range 12, Doppler 0} = 48'h00030d400300, written 4 cycles
//    after its successor entered.
// 2. Random streams with random threshold reloads, read out continuously,
//    checked against a reference model of threshold + local maximum.
// 3. More peaks than the FIFO holds without reading: fifo_full, the sticky
//    fifo_overflow flag, and the first FIFO_DEPTH peaks read back intact.
module tb_peak_detector_core;
  import radar_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic               valid_in, threshold_load, fifo_rd_en;
  logic [MAG_W-1:0]   mag_in, threshold_val;
  logic [RANGE_W-1:0] range_in;
  logic [DOPP_W-1:0]  doppler_in;
  logic [PEAK_W-1:0]  fifo_dout;
  logic               fifo_empty, fifo_full, fifo_overflow;

  peak_detector_core dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", what);
    end
  endtask

  // reference model state
  peak_t  ref_q [$];          // expected FIFO contents
  logic [MAG_W-1:0] thr_m;
  peak_t  w_prev, w_curr;
  logic   a_curr;
  int     w_fill;

  task automatic model_sample(input peak_t s);
    logic a;
    a = s.mag > thr_m;
    if (w_fill >= 1 && a_curr && w_curr.mag > w_prev.mag && w_curr.mag > s.mag)
      ref_q.push_back(w_curr);
    w_prev = w_curr; w_curr = s; a_curr = a;
    if (w_fill < 2) w_fill++;
  endtask

  task automatic drive(input logic [MAG_W-1:0] m, input int r, input int d);
    valid_in = 1; mag_in = m; range_in = RANGE_W'(r); doppler_in = DOPP_W'(d);
  endtask

  peak_t got [$];

  initial begin
    valid_in = 0; threshold_load = 0; fifo_rd_en = 0; mag_in = 0;
    threshold_val = 0; range_in = 0; doppler_in = 0;
    thr_m = 0; w_prev = '0; w_curr = '0; a_curr = 0; w_fill = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // ---- 1. directed stream ----
    @(negedge clk) begin threshold_val = 32'd100000; threshold_load = 1; end
    @(negedge clk) threshold_load = 0;
    begin
      logic [MAG_W-1:0] mags [5] = '{50000, 120000, 200000, 130000, 60000};
      int t_empty;
      for (int i = 0; i < 5; i++) begin
        @(negedge clk) drive(mags[i], 10 + i, 0);
      end
      @(negedge clk) valid_in = 0;
      // count cycles from the successor (index 3) being presented
      t_empty = 2;
      while (fifo_empty && t_empty < 20) begin @(negedge clk); t_empty++; end
      check(t_empty == 4, $sformatf("directed: fifo_empty fell %0d cycles after successor, expected 4", t_empty));
      @(negedge clk) fifo_rd_en = 1;
      @(negedge clk) fifo_rd_en = 0;
      check(fifo_dout == 48'h00030d400300, $sformatf("directed peak word %h", fifo_dout));
      check(fifo_empty, "directed: exactly one peak");
      repeat (3) @(negedge clk);
      check(fifo_empty, "directed: no later peak");
    end

    // reset to give the model a clean window
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    thr_m = 0; w_prev = '0; w_curr = '0; a_curr = 0; w_fill = 0; ref_q.delete();
    @(negedge clk) got.delete();

    // ---- 2. random streams, continuous read ----
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      valid_in = ($urandom % 5) != 0;
      mag_in   = 32'($urandom % 64) * 32'd1000;
      range_in = RANGE_W'(n); doppler_in = DOPP_W'(n >> 10);
      threshold_load = ($urandom % 500) == 0;
      threshold_val  = 32'($urandom % 40) * 32'd1000;
      fifo_rd_en = 1;
      if (valid_in) begin
        peak_t s;
        s.mag = mag_in; s.range_idx = range_in; s.doppler_idx = doppler_in;
        model_sample(s);
      end
      if (threshold_load) thr_m = threshold_val;
    end
    @(negedge clk) valid_in = 0;
    repeat (10) @(negedge clk);
    fifo_rd_en = 0;
    // gather what was read: re-run reading by monitoring below
    check(got.size() == ref_q.size(), $sformatf("random: %0d peaks read, %0d expected", got.size(), ref_q.size()));
    for (int i = 0; i < got.size() && i < ref_q.size(); i++)
      check(got[i] == ref_q[i], $sformatf("random peak %0d got %h exp %h", i, got[i], ref_q[i]));
    $display("random phase: %0d peaks", ref_q.size());

    // ---- 3. overflow ----
    got.delete(); ref_q.delete();
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    thr_m = 0; w_prev = '0; w_curr = '0; a_curr = 0; w_fill = 0;
    @(negedge clk) begin threshold_val = 32'd10; threshold_load = 1; end
    @(negedge clk) threshold_load = 0; thr_m = 32'd10;
    for (int n = 0; n < 80; n++) begin   // alternating 100/0: a peak every 2 samples
      peak_t s;
      @(negedge clk) drive((n % 2) ? 32'd100 + n : 32'd0, n, 5);
      s.mag = mag_in; s.range_idx = range_in; s.doppler_idx = doppler_in;
      model_sample(s);
    end
    @(negedge clk) valid_in = 0;
    repeat (8) @(negedge clk);
    check(fifo_full, "overflow: FIFO full");
    check(fifo_overflow, "overflow: sticky overflow flag set");
    for (int i = 0; i < 16; i++) begin
      @(negedge clk) fifo_rd_en = 1;
    end
    @(negedge clk) fifo_rd_en = 0;
    @(negedge clk);
    check(fifo_empty, "overflow: empty after 16 reads");
    check(got.size() == 16, $sformatf("overflow: read %0d", got.size()));
    for (int i = 0; i < got.size(); i++)
      check(got[i] == ref_q[i], $sformatf("overflow peak %0d got %h exp %h", i, got[i], ref_q[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect every word read out (registered read port: data one cycle later)
  logic rd_d;
  always @(posedge clk) begin
    rd_d <= fifo_rd_en && !fifo_empty && !rst;
    if (rd_d) got.push_back(peak_t'(fifo_dout));
  end
endmodule
