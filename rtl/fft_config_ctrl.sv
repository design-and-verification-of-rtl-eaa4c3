// fft_config_ctrl: configuration and data gating in front of an FFT core.
//
// After reset the block offers the core's 16-bit configuration word
// (CONFIG_WORD, bit 0 = forward transform) on the s_axis_config channel.
// The valid register is set while configuration is not yet done and drops
// with the handshake (cfg_tvalid && cfg_tready); at that handshake the
// config_done register is set and stays set until the next reset. Sample
// data is passed to the core's s_axis_data channel only once configuration
// is done: before that the core sees no valid and the source sees no ready.
// aresetn is the core's active-low reset, the inverse of rst.
//
// Timing: cfg_tvalid rises the cycle after reset is released; data may flow
// from the cycle after the configuration handshake.
// The config_done, config-valid and config-data registers, the inverted
// reset and the configuration value 0x0001 follow the range FFT wrapper
// of the source; gating the data channel with config_done is this design's
// choice.
module fft_config_ctrl #(
  parameter logic [15:0] CONFIG_WORD = radar_pkg::FFT_CONFIG_WORD
) (
  input  logic        clk,
  input  logic        rst,
  output logic        aresetn,
  // configuration channel to the core
  output logic [15:0] cfg_tdata,
  output logic        cfg_tvalid,
  input  logic        cfg_tready,
  output logic        config_done,
  // data channel: source side
  input  logic        src_tvalid,
  output logic        src_tready,
  // data channel: core side
  output logic        core_tvalid,
  input  logic        core_tready
);

  always_ff @(posedge clk) begin
    if (rst) begin
      config_done <= 1'b0;
      cfg_tvalid  <= 1'b0;
      cfg_tdata   <= CONFIG_WORD;
    end else begin
      cfg_tdata  <= CONFIG_WORD;
      cfg_tvalid <= !config_done && !(cfg_tvalid && cfg_tready);
      if (cfg_tvalid && cfg_tready) config_done <= 1'b1;
    end
  end

  always_comb begin
    aresetn     = !rst;
    core_tvalid = src_tvalid && config_done;
    src_tready  = core_tready && config_done;
  end

  // The configuration word is sent exactly once per reset.
  assert property (@(posedge clk) disable iff (rst) config_done |-> !cfg_tvalid);

endmodule
