// pd_threshold_reg: programmable threshold register and threshold compare
// stage of the peak detection core.
//
// The threshold value presented on threshold_val is captured when
// threshold_load is high and applies from the next clock cycle on; it can be
// reloaded at any time. Every valid input sample is compared with the
// register (strictly greater, |X(k,m)| > T) and forwarded one cycle later
// together with its range and Doppler index and an "above" flag. Samples at
// or below the threshold still travel on (flag low) because the local-maximum
// window needs them as neighbours.
//
// Timing: one register stage, one sample per clock, no stall.
// The register, its load strobe and the strict compare follow the source
// description; the reset value of 0 and the forwarding of below-threshold
// samples are choices of this design.
module pd_threshold_reg
  import radar_pkg::*;
(
  input  logic             clk,
  input  logic             rst,            // synchronous, active high
  input  logic [MAG_W-1:0] threshold_val,
  input  logic             threshold_load,
  input  logic             valid_in,
  input  peak_t            sample_in,
  output logic [MAG_W-1:0] threshold_q,    // current threshold
  output logic             valid_out,
  output peak_t            sample_out,
  output logic             above_out       // sample_out.mag > threshold
);

  always_ff @(posedge clk) begin
    if (rst) begin
      threshold_q <= '0;
      valid_out   <= 1'b0;
      sample_out  <= '0;
      above_out   <= 1'b0;
    end else begin
      if (threshold_load) threshold_q <= threshold_val;
      valid_out <= valid_in;
      if (valid_in) begin
        sample_out <= sample_in;
        above_out  <= sample_in.mag > threshold_q;
      end
    end
  end

endmodule
