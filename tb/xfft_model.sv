// xfft_model: behavioural (non-synthesizable) model of a pipelined-streaming
// FFT core, used only by the testbenches in place of the vendor FFT IP.
//
// Ports follow the vendor core's AXI4-Stream channels: a 16-bit
// configuration channel (bit 0: 1 = forward transform), a 32-bit data input
// {imag, real} with tlast, and a 32-bit data output with tlast, plus the
// frame-started / tlast-unexpected / tlast-missing event outputs. After
// aresetn the core accepts one configuration word; data is accepted from
// then on, one sample per clock. When NFFT samples have arrived the model
// computes the DFT in zero time, scaled by 1/NFFT and rounded to 16 bits,
// and streams the NFFT results out in natural order one per clock while the
// next frame is being collected. Output latency: first result LATENCY
// cycles after the last input of the frame.
module xfft_model #(
  parameter int unsigned NFFT    = 1024,
  parameter int unsigned LATENCY = 4
) (
  input  logic        aclk,
  input  logic        aresetn,
  input  logic [15:0] s_axis_config_tdata,
  input  logic        s_axis_config_tvalid,
  output logic        s_axis_config_tready,
  input  logic [31:0] s_axis_data_tdata,
  input  logic        s_axis_data_tvalid,
  input  logic        s_axis_data_tlast,
  output logic        s_axis_data_tready,
  output logic [31:0] m_axis_data_tdata,
  output logic        m_axis_data_tvalid,
  output logic        m_axis_data_tlast,
  output logic        event_frame_started,
  output logic        event_tlast_unexpected,
  output logic        event_tlast_missing
);

  real    cos_t [NFFT];
  real    sin_t [NFFT];
  real    in_re [NFFT];
  real    in_im [NFFT];
  int     n_in;
  logic   configured;
  logic   fwd;
  int     frames_out;

  typedef struct { logic [31:0] d; logic last; int unsigned t; } out_t;
  out_t   outq [$];
  longint unsigned cyc;

  initial begin
    for (int i = 0; i < NFFT; i++) begin
      cos_t[i] = $cos(2.0 * 3.14159265358979323846 * real'(i) / real'(NFFT));
      sin_t[i] = $sin(2.0 * 3.14159265358979323846 * real'(i) / real'(NFFT));
    end
  end

  function automatic logic [15:0] q16(input real v);
    real r;
    r = (v >= 0.0) ? v + 0.5 : v - 0.5;
    if (r > 32767.0)  r = 32767.0;
    if (r < -32768.0) r = -32768.0;
    return 16'($rtoi(r));
  endfunction

  task automatic compute_frame();
    for (int k = 0; k < int'(NFFT); k++) begin
      real ar, ai;
      out_t o;
      ar = 0.0; ai = 0.0;
      for (int n = 0; n < int'(NFFT); n++) begin
        int idx;
        real s;
        idx = (k * n) % int'(NFFT);
        s   = fwd ? sin_t[idx] : -sin_t[idx];
        ar += in_re[n] * cos_t[idx] + in_im[n] * s;
        ai += in_im[n] * cos_t[idx] - in_re[n] * s;
      end
      o.d    = {q16(ai / real'(NFFT)), q16(ar / real'(NFFT))};
      o.last = (k == int'(NFFT) - 1);
      o.t    = 32'(cyc) + LATENCY;
      outq.push_back(o);
    end
  endtask

  assign s_axis_config_tready = aresetn && !configured;
  assign s_axis_data_tready   = aresetn && configured;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      configured             <= 1'b0;
      fwd                    <= 1'b1;
      n_in                   <= 0;
      cyc                    <= 0;
      frames_out             <= 0;
      outq.delete();
      m_axis_data_tvalid     <= 1'b0;
      m_axis_data_tlast      <= 1'b0;
      m_axis_data_tdata      <= '0;
      event_frame_started    <= 1'b0;
      event_tlast_unexpected <= 1'b0;
      event_tlast_missing    <= 1'b0;
    end else begin
      cyc <= cyc + 1;
      event_frame_started    <= 1'b0;
      event_tlast_unexpected <= 1'b0;
      event_tlast_missing    <= 1'b0;
      if (s_axis_config_tvalid && s_axis_config_tready) begin
        configured <= 1'b1;
        fwd        <= s_axis_config_tdata[0];
      end
      if (s_axis_data_tvalid && s_axis_data_tready) begin
        in_re[n_in] = real'($signed(s_axis_data_tdata[15:0]));
        in_im[n_in] = real'($signed(s_axis_data_tdata[31:16]));
        if (n_in == 0) event_frame_started <= 1'b1;
        if (n_in == int'(NFFT) - 1) begin
          if (!s_axis_data_tlast) event_tlast_missing <= 1'b1;
          compute_frame();
          n_in <= 0;
        end else begin
          if (s_axis_data_tlast) event_tlast_unexpected <= 1'b1;
          n_in <= n_in + 1;
        end
      end
      if (outq.size() > 0 && outq[0].t <= 32'(cyc)) begin
        out_t o;
        o = outq.pop_front();
        m_axis_data_tvalid <= 1'b1;
        m_axis_data_tdata  <= o.d;
        m_axis_data_tlast  <= o.last;
        if (o.last) frames_out <= frames_out + 1;
      end else begin
        m_axis_data_tvalid <= 1'b0;
        m_axis_data_tlast  <= 1'b0;
      end
    end
  end

endmodule
