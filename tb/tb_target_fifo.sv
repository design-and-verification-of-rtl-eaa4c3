// tb_target_fifo: self-checking testbench of target_fifo (DEPTH 8).
// Random writes and reads against a queue model: checks the registered read
// data, empty, full, count and the sticky overflow flag raised by writing
// into a full FIFO (words written then are dropped, as in the model).
module tb_target_fifo;
  localparam int W = 48, D = 8;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic         wr_en, rd_en, empty, full, overflow;
  logic [W-1:0] din, dout;
  logic [$clog2(D):0] count;

  target_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] q [$];
    logic [W-1:0] exp_dout;
    logic         exp_ovf;
    int           drops = 0;
    wr_en = 0; rd_en = 0; din = '0; exp_dout = '0; exp_ovf = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 5000; n++) begin
      int phase;
      @(negedge clk);
      checks++;
      if (dout !== exp_dout || empty !== (q.size() == 0) || full !== (q.size() == D) ||
          int'(count) != q.size() || overflow !== exp_ovf) begin
        failures++;
        if (failures < 10) $display("n=%0d dout=%h/%h empty=%b full=%b count=%0d/%0d ovf=%b/%b",
          n, dout, exp_dout, empty, full, count, q.size(), overflow, exp_ovf);
      end
      // alternate write-heavy and read-heavy phases
      phase = (n / 200) % 2;
      wr_en = phase == 0 ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      rd_en = phase == 0 ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      din   = {$urandom, 16'($urandom)};
      // model, in the order the hardware evaluates within one edge
      begin
        logic do_rd, do_wr;
        do_rd = rd_en && q.size() > 0;
        do_wr = wr_en && q.size() < D;
        if (wr_en && q.size() == D) begin exp_ovf = 1; drops++; end
        if (do_rd) exp_dout = q.pop_front();
        if (do_wr) q.push_back(din);
      end
    end
    checks++;
    if (drops == 0) begin failures++; $display("overflow never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
