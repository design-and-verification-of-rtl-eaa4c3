// tb_pd_local_max: self-checking testbench of pd_local_max.
// Streams random small magnitudes (many ties) with random above flags and
// random gaps in valid. The expected peaks are worked out from the list of
// accepted samples: sample i is a peak when above[i] and mag[i] > mag[i-1]
// and mag[i] > mag[i+1] (mag[-1] = 0). Checks the peaks in order, their
// indices, that none is missing or extra, and that each appears exactly two
// cycles after its successor sample was presented.
module tb_pd_local_max;
  import radar_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic  valid_in, above_in, peak_valid;
  peak_t sample_in, peak;

  pd_local_max dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  peak_t smp [$];
  logic  abv [$];
  int    tin [$];      // negedge count at which each sample was presented
  peak_t got [$];
  int    tgot [$];
  int    ncyc = 0;

  initial begin
    valid_in = 0; above_in = 0; sample_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      ncyc++;
      if (peak_valid) begin got.push_back(peak); tgot.push_back(ncyc); end
      valid_in = ($urandom % 4) != 0;
      sample_in.mag         = 32'($urandom % 6);
      sample_in.range_idx   = RANGE_W'(n);
      sample_in.doppler_idx = DOPP_W'(n >> 10);
      above_in = ($urandom % 4) != 0;
      if (valid_in) begin smp.push_back(sample_in); abv.push_back(above_in); tin.push_back(ncyc); end
    end
    @(negedge clk);
    ncyc++;
    if (peak_valid) begin got.push_back(peak); tgot.push_back(ncyc); end
    valid_in = 0;
    repeat (5) begin
      @(negedge clk); ncyc++;
      if (peak_valid) begin got.push_back(peak); tgot.push_back(ncyc); end
    end
    begin
      int k = 0;
      for (int i = 0; i + 1 < smp.size(); i++) begin
        logic [MAG_W-1:0] pm;
        pm = (i == 0) ? '0 : smp[i-1].mag;
        if (abv[i] && smp[i].mag > pm && smp[i].mag > smp[i+1].mag) begin
          checks++;
          if (k >= got.size()) begin
            failures++;
            if (failures < 10) $display("missing peak at sample %0d", i);
          end else begin
            if (got[k] !== smp[i]) begin
              failures++;
              if (failures < 10) $display("peak %0d: got %h exp %h", k, got[k], smp[i]);
            end
            checks++;
            if (tgot[k] != tin[i+1] + 2) begin
              failures++;
              if (failures < 10) $display("peak %0d latency %0d", k, tgot[k] - tin[i+1]);
            end
          end
          k++;
        end
      end
      checks++;
      if (k != got.size()) begin
        failures++;
        $display("peak count got %0d exp %0d", got.size(), k);
      end
      $display("peaks: %0d of %0d samples", k, smp.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
