// tb_output_buffer: feeds one output buffer with cells read from the buffer
// RAM (load) and with cut-through claims (arm_ct), each issued at a random
// time while the link sends the previous frame or idles, and decodes the
// byte stream it sends. Checks: every frame is a delimiter followed by 53
// bytes; a loaded cell goes out byte for byte in order; a cut-through frame
// is flagged with its input (cur_ct, cur_in) and ends with ct_done on its
// last clock; frames follow each other without a gap when the next one is
// ready at the frame end; an idle link sends delimiters; frame_start marks
// each delimiter clock.
module tb_output_buffer;
  import atm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic        load, arm_ct, busy, frame_start, out_idle, cur_ct, ct_done, ob_sig;
  cell_t       load_cell;
  link_t       arm_in, cur_in;
  logic [5:0]  f;
  logic [7:0]  ob_byte;
  logic [15:0] cnt_frames;
  int checks = 0, failures = 0;

  output_buffer dut (.clk, .rst_n, .load, .load_cell, .arm_ct, .arm_in, .busy, .f, .frame_start,
                     .out_idle, .cur_ct, .cur_in, .ct_done, .ob_sig, .ob_byte, .cnt_frames);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit ct; link_t in; cell_t c; } op_t;
  op_t    exp_q [$];
  bit     pending = 0;
  op_t    cur;
  int     pos = -1;
  int     frames = 0, ct_frames = 0, b2b = 0;
  bit     last_end = 0;

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      check(frame_start == (busy && f == 0), "frame_start");
      if (!busy) check(ob_sig == 1'b1, "idle link sends delimiters");
      if (frame_start) begin
        check(ob_sig == 1'b1, "frame begins with a delimiter");
        check(exp_q.size() > 0, "frame without a cell");
        if (last_end) b2b++;
        if (exp_q.size() > 0) begin
          cur = exp_q.pop_front();
          pending = 0;
        end
        check(cur_ct == cur.ct && (!cur.ct || cur_in == cur.in), "cut-through flag and input");
        pos = 0;
        frames++;
        if (cur.ct) ct_frames++;
      end else if (busy && pos >= 0) begin
        check(ob_sig == 1'b0, "data byte");
        check(int'(f) == pos + 1, "frame clock");
        if (!cur.ct) check(ob_byte == cur.c[8*pos +: 8], $sformatf("byte %0d", pos));
        check(ct_done == (cur.ct && pos == CELL_BYTES - 1), "ct_done");
        pos++;
      end
      last_end = busy && f == 6'(FRAME - 1);
    end
  end

  initial begin
    load = 0; arm_ct = 0; arm_in = 0; load_cell = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      op_t o;
      while (pending) @(negedge clk);
      repeat ($urandom_range(($urandom_range(3) == 0) ? 120 : 50)) @(negedge clk);
      o.ct = $urandom_range(2) == 0;
      o.in = link_t'($urandom);
      for (int i = 0; i < CELL_BYTES; i++) o.c[8*i +: 8] = 8'($urandom);
      load = !o.ct;
      load_cell = o.c;
      arm_ct = o.ct;
      arm_in = o.in;
      exp_q.push_back(o);
      pending = 1;
      @(negedge clk);
      load = 0;
      arm_ct = 0;
    end
    while (pending) @(negedge clk);
    repeat (60) @(posedge clk);
    check(frames == 400 && cnt_frames == 16'd400, "all frames sent and counted");
    check(ct_frames > 50 && b2b > 50, "cut-through and back-to-back frames seen");
    check(out_idle, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
