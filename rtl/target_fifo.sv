// target_fifo: synchronous FIFO holding detected peaks.
//
// Words are written with wr_en and read with rd_en. The read port is
// registered: the word appears on dout the cycle after rd_en is taken while
// the FIFO is not empty, and dout holds its value otherwise. Writing while
// full drops the word and sets the sticky overflow flag (cleared by reset),
// so the detector upstream never stalls. A read and a write in the same
// cycle are both taken. empty/full/count are registered.
//
// Storage is a plain array (inferred RAM); DEPTH must be a power of two.
// The source describes the FIFO's role and word format but not its depth,
// read timing or full behaviour; those are choices of this design.
module target_fifo #(
  parameter int unsigned WIDTH = 48,
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   wr_en,
  input  logic [WIDTH-1:0]       din,
  input  logic                   rd_en,
  output logic [WIDTH-1:0]       dout,
  output logic                   empty,
  output logic                   full,
  output logic                   overflow,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  logic do_wr, do_rd;
  always_comb begin
    do_rd = rd_en && !empty;
    do_wr = wr_en && !full;
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      empty    <= 1'b1;
      full     <= 1'b0;
      overflow <= 1'b0;
      dout     <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) begin
        rptr <= rptr + 1'b1;
        dout <= mem[rptr];
      end
      if (wr_en && full) overflow <= 1'b1;
      unique case ({do_wr, do_rd})
        2'b10: begin
          count <= count + 1'b1;
          empty <= 1'b0;
          full  <= (count == ($clog2(DEPTH)+1)'(DEPTH - 1));
        end
        2'b01: begin
          count <= count - 1'b1;
          full  <= 1'b0;
          empty <= (count == ($clog2(DEPTH)+1)'(1));
        end
        default: ;
      endcase
    end
  end

  // A full FIFO never reports empty and vice versa.
  assert property (@(posedge clk) disable iff (rst) !(empty && full));

endmodule
