// sample_generator: synthetic FMCW beat-signal source for the processing
// chain.
//
// Produces frames of NUM_CHIRPS chirps of RANGE_BINS complex samples each.
// Every target t has a phase accumulator. Within a chirp it advances per
// sample by TGT_RANGE_BIN[t] / RANGE_BINS of a turn, giving a beat tone that
// falls exactly on range bin TGT_RANGE_BIN[t]. At the start of each chirp it
// restarts from a per-chirp phase that advances by TGT_DOPP_BIN[t] /
// NUM_CHIRPS of a turn per chirp, giving the Doppler shift of Doppler bin
// TGT_DOPP_BIN[t]. The top LUT_BITS of each phase address a cosine table
// (sine = cosine a quarter turn earlier); each target contributes
// amplitude * e^{j phase} and the sum is saturated to 16 bits.
//
// Interface: a start pulse begins one frame; samples leave as an AXI4-Stream
// master word {imag[15:0], real[15:0]} with tlast at the end of each chirp
// and frame_last on the final sample of the frame; busy is high during the
// frame. The output is combinational from the phase registers and advances
// on each accepted beat.
//
// The phase-accumulator/lookup-table method and the 1024 x 64 frame follow
// the source; the number of targets, their bins and amplitudes, the table
// size and the start/busy control are this design's choices.
module sample_generator
  import radar_pkg::*;
#(
  parameter int unsigned RANGE_BINS  = radar_pkg::DEF_RANGE_BINS,
  parameter int unsigned NUM_CHIRPS  = radar_pkg::DEF_NUM_CHIRPS,
  parameter int unsigned NUM_TARGETS = 2,
  parameter int unsigned LUT_BITS    = 10,
  parameter int unsigned TGT_RANGE_BIN [NUM_TARGETS] = '{100, 285},
  parameter int unsigned TGT_DOPP_BIN  [NUM_TARGETS] = '{12, 40},
  parameter int unsigned TGT_AMP       [NUM_TARGETS] = '{8000, 6000}  // peak amplitude, LSBs
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic [CPLX_W-1:0] m_axis_tdata,
  output logic              m_axis_tvalid,
  output logic              m_axis_tlast,
  output logic              frame_last,
  input  logic              m_axis_tready
);

  localparam int unsigned LUT_SIZE = 1 << LUT_BITS;
  localparam int unsigned SUM_W    = SAMPLE_W + $clog2(NUM_TARGETS) + 2;

  typedef logic signed [SAMPLE_W-1:0] lut_t [LUT_SIZE];

  // cos(2*pi*i/LUT_SIZE) in Q1.15, rounded to nearest.
  function automatic lut_t make_cos_lut();
    lut_t t;
    for (int i = 0; i < LUT_SIZE; i++) begin
      real v;
      v = 32767.0 * $cos(2.0 * 3.14159265358979323846 * real'(i) / real'(LUT_SIZE));
      t[i] = SAMPLE_W'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return t;
  endfunction

  localparam lut_t COS_LUT = make_cos_lut();

  // Phase steps in units of 2^-32 turn.
  function automatic logic [31:0] step(input int unsigned bin, input int unsigned n);
    return 32'((64'(bin) << 32) / 64'(n));
  endfunction

  logic [31:0]               phase       [NUM_TARGETS];
  logic [31:0]               chirp_phase [NUM_TARGETS];
  logic [$clog2(RANGE_BINS)-1:0] sample_cnt;
  logic [$clog2(NUM_CHIRPS)-1:0] chirp_cnt;

  logic chirp_end, frame_end, beat;
  always_comb begin
    chirp_end = (sample_cnt == ($clog2(RANGE_BINS))'(RANGE_BINS - 1));
    frame_end = chirp_end && (chirp_cnt == ($clog2(NUM_CHIRPS))'(NUM_CHIRPS - 1));
    beat      = m_axis_tvalid && m_axis_tready;
  end

  // Sum of the targets' complex exponentials.
  logic signed [SUM_W-1:0] sum_re, sum_im;
  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int t = 0; t < NUM_TARGETS; t++) begin
      logic [LUT_BITS-1:0] idx_c, idx_s;
      logic signed [SAMPLE_W+17:0] pc, ps;
      idx_c = phase[t][31 -: LUT_BITS];
      idx_s = idx_c - LUT_BITS'(LUT_SIZE / 4);
      pc = COS_LUT[idx_c] * $signed({2'b00, 16'(TGT_AMP[t])});
      ps = COS_LUT[idx_s] * $signed({2'b00, 16'(TGT_AMP[t])});
      sum_re = sum_re + SUM_W'(pc >>> 15);
      sum_im = sum_im + SUM_W'(ps >>> 15);
    end
  end

  function automatic logic [SAMPLE_W-1:0] sat16(input logic signed [SUM_W-1:0] v);
    if (v > SUM_W'(32767))       return 16'h7fff;
    else if (v < -SUM_W'(32768)) return 16'h8000;
    else                         return v[SAMPLE_W-1:0];
  endfunction

  always_comb begin
    m_axis_tvalid = busy;
    m_axis_tdata  = {sat16(sum_im), sat16(sum_re)};
    m_axis_tlast  = busy && chirp_end;
    frame_last    = busy && frame_end;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      sample_cnt <= '0;
      chirp_cnt  <= '0;
      for (int t = 0; t < NUM_TARGETS; t++) begin
        phase[t]       <= '0;
        chirp_phase[t] <= '0;
      end
    end else if (!busy) begin
      if (start) begin
        busy       <= 1'b1;
        sample_cnt <= '0;
        chirp_cnt  <= '0;
        for (int t = 0; t < NUM_TARGETS; t++) begin
          phase[t]       <= '0;
          chirp_phase[t] <= '0;
        end
      end
    end else if (beat) begin
      if (chirp_end) begin
        sample_cnt <= '0;
        chirp_cnt  <= chirp_cnt + 1'b1;
        for (int t = 0; t < NUM_TARGETS; t++) begin
          chirp_phase[t] <= chirp_phase[t] + step(TGT_DOPP_BIN[t], NUM_CHIRPS);
          phase[t]       <= chirp_phase[t] + step(TGT_DOPP_BIN[t], NUM_CHIRPS);
        end
        if (frame_end) busy <= 1'b0;
      end else begin
        sample_cnt <= sample_cnt + 1'b1;
        for (int t = 0; t < NUM_TARGETS; t++)
          phase[t] <= phase[t] + step(TGT_RANGE_BIN[t], RANGE_BINS);
      end
    end
  end

endmodule
