// magnitude_sq: squared magnitude of a streaming complex sample.
//
// Input words hold a signed 16-bit real part in bits [15:0] and a signed
// 16-bit imaginary part in bits [31:16]. The square root is not taken:
// Re^2 + Im^2 is monotonic in |X|, which is all the peak detector needs.
//   Stage 1: Re^2 and Im^2 in two multipliers, each into a 32-bit register.
//   Stage 2: their sum, a 32-bit unsigned magnitude.
// valid and last travel through both stages beside the data. The sum cannot
// overflow: its largest value, 2 * 32768^2 = 2^31, fits in 32 bits.
//
// Timing: latency 2 cycles, one result per clock, no backpressure.
// Stage split, widths and word layout follow the source.
module magnitude_sq
  import radar_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              s_valid,
  input  logic              s_last,
  input  logic [CPLX_W-1:0] s_data,     // {imag, real}
  output logic              m_valid,
  output logic              m_last,
  output logic [MAG_W-1:0]  m_mag
);

  logic [MAG_W-1:0] re_sq, im_sq;
  logic             v1, l1;

  logic signed [2*SAMPLE_W-1:0] re_prod, im_prod;
  always_comb begin
    re_prod = cplx_re(s_data) * cplx_re(s_data);
    im_prod = cplx_im(s_data) * cplx_im(s_data);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1      <= 1'b0;
      l1      <= 1'b0;
      re_sq   <= '0;
      im_sq   <= '0;
      m_valid <= 1'b0;
      m_last  <= 1'b0;
      m_mag   <= '0;
    end else begin
      // stage 1: squaring
      v1    <= s_valid;
      l1    <= s_valid && s_last;
      re_sq <= MAG_W'(unsigned'(re_prod));
      im_sq <= MAG_W'(unsigned'(im_prod));
      // stage 2: addition
      m_valid <= v1;
      m_last  <= l1;
      m_mag   <= re_sq + im_sq;
    end
  end

endmodule
