// tb_fft_config_ctrl: self-checking testbench of fft_config_ctrl.
// The core's config ready is held low for a few cycles after reset. Checks:
// aresetn = !rst; cfg_tvalid rises the cycle after reset and holds the word
// 16'h0001 until the handshake; exactly one handshake; config_done after
// it; no data valid/ready passes before configuration and both pass after.
module tb_fft_config_ctrl;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        aresetn, cfg_tvalid, cfg_tready, config_done;
  logic [15:0] cfg_tdata;
  logic        src_tvalid, src_tready, core_tvalid, core_tready;

  fft_config_ctrl dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  int handshakes = 0;
  always @(posedge clk) if (!rst && cfg_tvalid && cfg_tready) handshakes++;

  initial begin
    cfg_tready = 0; src_tvalid = 1; core_tready = 1;
    repeat (3) @(negedge clk) check(!aresetn && !cfg_tvalid && !config_done, "in reset");
    rst = 0;
    @(negedge clk);
    check(aresetn, "aresetn high");
    check(cfg_tvalid && cfg_tdata == 16'h0001, "config word offered one cycle after reset");
    for (int i = 0; i < 4; i++) begin
      check(cfg_tvalid && !config_done, "config held until ready");
      check(!core_tvalid && !src_tready, "data blocked before configuration");
      @(negedge clk);
    end
    cfg_tready = 1;
    @(negedge clk);
    check(config_done && !cfg_tvalid, "done after handshake");
    check(core_tvalid && src_tready, "data passes after configuration");
    repeat (10) @(negedge clk) begin
      src_tvalid = $urandom; core_tready = $urandom;
      #1 check(core_tvalid == src_tvalid && src_tready == core_tready, "data pass-through");
    end
    check(handshakes == 1, $sformatf("%0d config handshakes", handshakes));
    // reset again: configuration is repeated
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    @(negedge clk);
    check(cfg_tvalid && !config_done, "reconfigures after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
