// range_fft_buffer: corner-turn memory between the range FFT and the
// Doppler FFT.
//
// One frame is RANGE_BINS range-FFT outputs for each of NUM_CHIRPS chirps.
// Write side: every valid range-FFT output is stored at the next address of
// a sequential counter, address = chirp * RANGE_BINS + range_bin, so one
// chirp occupies one contiguous block. Once the whole frame is stored the
// buffer switches to read-out and streams it transposed as an AXI4-Stream
// master: for range bin 0 the samples of chirps 0..NUM_CHIRPS-1, then range
// bin 1, and so on (address = chirp * RANGE_BINS + range_bin with the chirp
// counter fastest). tlast closes each group of NUM_CHIRPS samples, i.e. one
// Doppler FFT frame. When the last sample has been taken the buffer returns
// to writing and pulses frame_done.
//
// There is one frame of storage. wr_ready is high while the buffer accepts
// writes; a write during read-out is dropped and sets the sticky overflow
// flag. The source must therefore hold the next frame back until
// frame_done. wr_last (the range FFT's end-of-chirp marker) is checked
// against the write counter; a mismatch sets the sticky wr_align_error.
//
// Timing: the memory has a registered read port (block RAM); its output
// register is the stream's data register and only advances when the
// consumer takes a beat or the register is empty, so read-out runs at one
// sample per clock while m_axis_tready is high. Read-out of a frame takes
// RANGE_BINS * NUM_CHIRPS + 1 cycles with an always-ready consumer.
// Sequential write addressing, the 65536-word depth and the per-range-bin
// reorganisation follow the source; the single-frame storage, the switch
// to read-out only when full and the overflow flag are this design's
// choices.
module range_fft_buffer
  import radar_pkg::*;
#(
  parameter int unsigned RANGE_BINS = radar_pkg::DEF_RANGE_BINS,
  parameter int unsigned NUM_CHIRPS = radar_pkg::DEF_NUM_CHIRPS
) (
  input  logic              clk,
  input  logic              rst,
  // write side (range FFT output)
  input  logic              wr_en,
  input  logic [CPLX_W-1:0] wr_data,
  input  logic              wr_last,
  output logic              wr_ready,
  output logic              wr_align_error,
  output logic              overflow,
  output logic [RANGE_W-1:0] wr_range_index,
  output logic [DOPP_W-1:0]  wr_chirp_index,
  // read side (to the Doppler FFT)
  output logic [CPLX_W-1:0] m_axis_tdata,
  output logic              m_axis_tvalid,
  output logic              m_axis_tlast,
  input  logic              m_axis_tready,
  output logic              frame_done
);

  localparam int unsigned TOTAL_DEPTH = RANGE_BINS * NUM_CHIRPS;
  localparam int unsigned AW = $clog2(TOTAL_DEPTH);

  typedef enum logic {S_WRITE, S_READ} state_t;
  state_t state;

  logic [CPLX_W-1:0] mem [TOTAL_DEPTH];

  logic [AW-1:0]      wr_addr;
  logic [RANGE_W-1:0] rd_range;
  logic [DOPP_W-1:0]  rd_chirp;
  logic               rd_issued_all;   // last address has been read

  logic do_wr, advance, issue;
  logic [AW-1:0] rd_addr;
  always_comb begin
    do_wr   = wr_en && (state == S_WRITE);
    advance = (state == S_READ) && (!m_axis_tvalid || m_axis_tready);
    issue   = advance && !rd_issued_all;
    rd_addr = AW'(rd_chirp) * AW'(RANGE_BINS) + AW'(rd_range);
    wr_ready = (state == S_WRITE);
  end

  // memory: write port and registered read port
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_addr] <= wr_data;
    if (issue) m_axis_tdata <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_WRITE;
      wr_addr        <= '0;
      wr_range_index <= '0;
      wr_chirp_index <= '0;
      rd_range       <= '0;
      rd_chirp       <= '0;
      rd_issued_all  <= 1'b0;
      m_axis_tvalid  <= 1'b0;
      m_axis_tlast   <= 1'b0;
      overflow       <= 1'b0;
      wr_align_error <= 1'b0;
      frame_done     <= 1'b0;
    end else begin
      if (do_wr && (wr_last != (wr_range_index == RANGE_W'(RANGE_BINS - 1))))
        wr_align_error <= 1'b1;
      frame_done <= 1'b0;
      if (wr_en && state != S_WRITE) overflow <= 1'b1;

      unique case (state)
        S_WRITE: begin
          if (do_wr) begin
            if (wr_addr == AW'(TOTAL_DEPTH - 1)) begin
              wr_addr        <= '0;
              wr_range_index <= '0;
              wr_chirp_index <= '0;
              state          <= S_READ;
            end else begin
              wr_addr <= wr_addr + 1'b1;
              if (wr_range_index == RANGE_W'(RANGE_BINS - 1)) begin
                wr_range_index <= '0;
                wr_chirp_index <= wr_chirp_index + 1'b1;
              end else begin
                wr_range_index <= wr_range_index + 1'b1;
              end
            end
          end
        end
        S_READ: begin
          if (advance) begin
            m_axis_tvalid <= issue;
            m_axis_tlast  <= issue && (rd_chirp == DOPP_W'(NUM_CHIRPS - 1));
            if (issue) begin
              if (rd_chirp == DOPP_W'(NUM_CHIRPS - 1)) begin
                rd_chirp <= '0;
                if (rd_range == RANGE_W'(RANGE_BINS - 1)) begin
                  rd_range      <= '0;
                  rd_issued_all <= 1'b1;
                end else begin
                  rd_range <= rd_range + 1'b1;
                end
              end else begin
                rd_chirp <= rd_chirp + 1'b1;
              end
            end else begin
              // last beat has been taken: frame read out
              rd_issued_all <= 1'b0;
              state         <= S_WRITE;
              frame_done    <= 1'b1;
            end
          end
        end
        default: state <= S_WRITE;
      endcase
    end
  end

  // AXI4-Stream rule: a beat on offer stays stable until it is taken.
  assert property (@(posedge clk) disable iff (rst)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast));

endmodule
