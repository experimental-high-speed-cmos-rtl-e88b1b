// readout_controller: the chip's control sequencing for readout. From a
// single read reset strobe it reads the whole array out, one 64-bit word per
// read clock, with no gaps between rows.
//
// After `read_reset` it reads row 0 into the sense amps (RD0), loads the row
// buffer (LD0) and moves the row into the shift register (XF0). It then
// streams: `data_valid` (the read clock handshake output) is high for
// WORDS = C*8/64 consecutive cycles per row. During word 0 of a row it reads
// the next row from the pixel memories, during word 1 it loads that row into
// the row buffer and advances the row read pointer, and on the last word it
// transfers the buffer into the shift register, so the next row follows with
// no bubble. A frame is 3 set-up cycles followed by R*WORDS valid words
// (12,672 at 352 x 288); `frame_done` pulses with the last word. A
// `read_reset` during a frame restarts it. The document gives the row-at-a-
// time read overlapped with shifting and the 64-bit bus; the cycle-level
// schedule is this design's choice.
module readout_controller
  import dps_pkg::*;
#(
  parameter int unsigned R   = ROWS,
  parameter int unsigned C   = COLS,
  parameter int unsigned W   = PIX_BITS,
  parameter int unsigned BUS = BUS_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 read_reset,
  output logic                 mem_rd_en,
  output logic [$clog2(R)-1:0] mem_rd_row,
  output logic                 buf_load,
  output logic                 xfer,
  output logic                 shift,
  output logic                 data_valid,
  output logic                 frame_done,
  output logic                 busy
);
  localparam int unsigned WORDS = C * W / BUS;

  typedef enum logic [2:0] {S_IDLE, S_RD0, S_LD0, S_XF0, S_STREAM} state_e;
  state_e state;

  logic [$clog2(WORDS)-1:0] word;
  logic [$clog2(R+1)-1:0]   rows_out;   // rows fully shifted out so far
  logic                     ptr_clear, ptr_advance, ptr_last;

  row_read_pointer #(.R(R)) u_ptr (
    .clk, .rst_n, .clear(ptr_clear), .advance(ptr_advance),
    .row(mem_rd_row), .last(ptr_last)
  );

  wire more_rows = (32'(rows_out) < R - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      word     <= '0;
      rows_out <= '0;
    end else if (read_reset) begin
      state    <= S_RD0;
      word     <= '0;
      rows_out <= '0;
    end else begin
      unique case (state)
        S_IDLE:  ;
        S_RD0:   state <= S_LD0;
        S_LD0:   state <= S_XF0;
        S_XF0:   state <= S_STREAM;
        S_STREAM: begin
          if (32'(word) == WORDS - 1) begin
            word     <= '0;
            rows_out <= rows_out + 1'b1;
            if (!more_rows) state <= S_IDLE;
          end else begin
            word <= word + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ptr_clear   = read_reset;
    ptr_advance = 1'b0;
    mem_rd_en   = 1'b0;
    buf_load    = 1'b0;
    xfer        = 1'b0;
    shift       = 1'b0;
    if (!read_reset) begin
      unique case (state)
        S_RD0: mem_rd_en = 1'b1;
        S_LD0: begin buf_load = 1'b1; ptr_advance = !ptr_last; end
        S_XF0: xfer = 1'b1;
        S_STREAM: begin
          if (word == 0 && more_rows) mem_rd_en = 1'b1;
          if (word == 1 && more_rows) begin buf_load = 1'b1; ptr_advance = !ptr_last; end
          if (32'(word) == WORDS - 1) xfer = more_rows;
          else                   shift = 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign data_valid = (state == S_STREAM);
  assign frame_done = (state == S_STREAM) && (32'(word) == WORDS - 1) && !more_rows;
  assign busy       = (state != S_IDLE);

  // The schedule needs the next row's read and load to fit inside one row.
  initial assert (WORDS >= 3 && WORDS * BUS == C * W)
    else $error("readout_controller: C*W must be a multiple of BUS with at least 3 words per row");
  a_no_xfer_and_shift: assert property (@(posedge clk) disable iff (!rst_n) !(xfer && shift));
  a_last_row: assert property (@(posedge clk) disable iff (!rst_n)
    frame_done |-> ptr_last);
endmodule
