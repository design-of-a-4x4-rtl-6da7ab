// output_buffer: double-buffered cell output of one outgoing link.
//
// A cell read from the buffer RAM is loaded in parallel into the lower
// latches (load). At the end of the cell being sent (frame clock 53) the
// lower latches are copied into the upper latches and a new frame starts:
// frame clock 0 carries the delimiter, clocks 1..53 carry bytes 0..52 of the
// upper latches. If the next cell is to come over an input buffer's
// cut-through bus instead (arm_ct), the new frame takes its bytes from that
// bus; the crossbar does the switching. With nothing loaded or armed, the
// link goes idle and sends delimiters; a cell loaded or armed while idle
// starts a frame on the next clock. Cells therefore leave back to back,
// one every 54 clocks, as long as the next one is ready by clock 53.
// Double buffering and the lower-to-upper copy on the delimiter clock are
// the chip's; the frame counter stands in for its 53-bit enable shift
// register (they carry the same information).
module output_buffer
  import atm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  cell_t      load_cell,
  input  logic       arm_ct,
  input  link_t      arm_in,
  output logic       busy,        // a frame is being sent
  output logic [5:0] f,           // frame clock, 0 = delimiter
  output logic       frame_start, // first clock of a frame
  output logic       out_idle,    // nothing sent, loaded or armed
  output logic       cur_ct,      // current frame comes from a cut-through bus
  output link_t      cur_in,      // ... of this input
  output logic       ct_done,     // last clock of a cut-through frame
  output logic       ob_sig,
  output logic [7:0] ob_byte,
  output logic [15:0] cnt_frames
);

  cell_t upper, lower;
  logic  lower_full;
  logic  next_ct;
  link_t next_in;
  wire   frame_end = busy && f == 6'(FRAME - 1);
  wire   have_next = lower_full || next_ct;

  assign frame_start = busy && f == 6'd0;
  assign out_idle    = !busy && !have_next;
  assign ct_done     = frame_end && cur_ct;
  assign ob_sig      = !busy || f == 6'd0;
  assign ob_byte     = (busy && f != 6'd0) ? upper[8*(f-6'd1) +: 8] : DELIM_BYTE;

  always_ff @(posedge clk) begin
    if ((frame_end || !busy) && lower_full && !next_ct) upper <= lower;
    if (load) lower <= load_cell;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      f          <= '0;
      lower_full <= 1'b0;
      next_ct    <= 1'b0;
      next_in    <= '0;
      cur_ct     <= 1'b0;
      cur_in     <= '0;
      cnt_frames <= '0;
    end else begin
      if (busy && !frame_end) f <= f + 6'd1;
      if (frame_end || !busy) begin
        if (have_next) begin
          busy       <= 1'b1;
          f          <= '0;
          cur_ct     <= next_ct;
          cur_in     <= next_in;
          next_ct    <= 1'b0;
          if (!next_ct) lower_full <= 1'b0;
          cnt_frames <= cnt_frames + 16'd1;
        end else begin
          busy   <= 1'b0;
          cur_ct <= 1'b0;
        end
      end
      if (load) lower_full <= 1'b1;
      if (arm_ct) begin
        next_ct <= 1'b1;
        next_in <= arm_in;
      end
    end
  end

endmodule
