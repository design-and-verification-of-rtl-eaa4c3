// tb_pd_threshold_reg: self-checking testbench of pd_threshold_reg.
// Random samples and random threshold reloads; checks one cycle later the
// forwarded sample, valid, and above = mag > threshold, where the threshold
// is the value loaded before the sample's cycle (a load takes effect on the
// next cycle). Magnitudes are drawn near the threshold to hit equality.
module tb_pd_threshold_reg;
  import radar_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [MAG_W-1:0] threshold_val, threshold_q;
  logic             threshold_load, valid_in, valid_out, above_out;
  peak_t            sample_in, sample_out;

  pd_threshold_reg dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAG_W-1:0] thr_model;
    logic             ev, ea;
    peak_t            es;
    threshold_val = '0; threshold_load = 0; valid_in = 0; sample_in = '0;
    thr_model = '0; ev = 0; ea = 0; es = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (valid_out !== ev || threshold_q !== thr_model ||
          (ev && (sample_out !== es || above_out !== ea))) begin
        failures++;
        if (failures < 10) $display("n=%0d got v=%b a=%b s=%h thr=%0d exp v=%b a=%b s=%h thr=%0d",
          n, valid_out, above_out, sample_out, threshold_q, ev, ea, es, thr_model);
      end
      checks++;
      valid_in              = ($urandom % 3) != 0;
      sample_in.mag         = thr_model + 32'($urandom % 7) - 32'd3;
      if ($urandom % 5 == 0) sample_in.mag = $urandom;
      sample_in.range_idx   = RANGE_W'($urandom);
      sample_in.doppler_idx = DOPP_W'($urandom);
      threshold_load        = ($urandom % 10) == 0;
      threshold_val         = 32'd1000 + ($urandom % 100000);
      ev = valid_in;
      if (valid_in) begin es = sample_in; ea = sample_in.mag > thr_model; end
      if (threshold_load) thr_model = threshold_val;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
