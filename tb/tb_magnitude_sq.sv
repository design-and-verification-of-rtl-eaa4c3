// tb_magnitude_sq: self-checking testbench of magnitude_sq.
// Drives random and extreme complex samples with random valid/last and
// checks, two cycles later, valid, last and Re^2+Im^2 computed here with
// 64-bit integer arithmetic.
module tb_magnitude_sq;
  import radar_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic              s_valid, s_last, m_valid, m_last;
  logic [CPLX_W-1:0] s_data;
  logic [MAG_W-1:0]  m_mag;

  magnitude_sq dut (.*);

  int checks = 0, failures = 0;
  logic        exp_v [3];
  logic        exp_l [3];
  longint      exp_m [3];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_valid = 0; s_last = 0; s_data = '0;
    for (int i = 0; i < 3; i++) begin exp_v[i] = 0; exp_l[i] = 0; exp_m[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      logic signed [15:0] re, im;
      @(negedge clk);
      // check what entered two cycles ago
      if (m_valid !== exp_v[1] || (exp_v[1] && (m_last !== exp_l[1] || m_mag !== 32'(exp_m[1])))) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d v=%b l=%b mag=%0d exp v=%b l=%b mag=%0d",
                                    n, m_valid, m_last, m_mag, exp_v[1], exp_l[1], exp_m[1]);
      end
      checks++;
      case (n % 50)
        0: begin re = -16'sd32768; im = -16'sd32768; end
        1: begin re = 16'sd32767;  im = -16'sd32768; end
        2: begin re = 16'sd0;      im = 16'sd0; end
        default: begin re = 16'($urandom); im = 16'($urandom); end
      endcase
      s_data  = {im, re};
      s_valid = ($urandom % 4) != 0;
      s_last  = ($urandom % 8) == 0;
      exp_v[1] = exp_v[0]; exp_l[1] = exp_l[0]; exp_m[1] = exp_m[0];
      exp_v[0] = s_valid;
      exp_l[0] = s_valid && s_last;
      exp_m[0] = longint'(re) * longint'(re) + longint'(im) * longint'(im);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
