// tb_buffer_ram: drives the 576 x 424 buffer RAM at its default size with a
// mix of writes, reads and refresh pairs (refresh read of a row into the
// refresh latch, write-back in a later slot), one operation per memory cycle
// (mem_en every second clock). Read data, registered at the memory cycle's
// end, are compared with a model; refresh must leave every row unchanged.
module tb_buffer_ram;
  import atm_pkg::*;

  logic clk = 1'b0;
  always #5 clk = !clk;

  logic        mem_en = 1'b0;
  logic [1:0]  op;
  logic        ref_wr;
  row_t        addr;
  cell_t       wdata, rdata;
  cell_t       model [NROWS];
  int checks = 0, failures = 0, refreshes = 0;

  buffer_ram dut (.clk, .mem_en, .op, .ref_wr, .addr, .wdata, .rdata);

  always @(posedge clk) mem_en <= !mem_en;

  function automatic cell_t rnd_cell();
    cell_t c;
    for (int i = 0; i < CELL_BITS / 8 + 1; i++) c[i*8 +: 8] = 8'($urandom);
    return c;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic slot(logic [1:0] o, logic rw, row_t a, cell_t d);
    // wait for the clock whose edge has mem_en high
    do @(negedge clk); while (!mem_en);
    op = o; ref_wr = rw; addr = a; wdata = d;
    @(posedge clk);
    #1;
  endtask

  initial begin
    op = 0; ref_wr = 0; addr = 0; wdata = '0;
    // fill every row
    for (int r = 0; r < NROWS; r++) begin
      model[r] = rnd_cell();
      slot(2'd2, 1'b0, row_t'(r), model[r]);
    end
    for (int t = 0; t < 6000; t++) begin
      automatic int k = $urandom_range(9);
      automatic row_t a = row_t'($urandom_range(NROWS - 1));
      if (k < 3) begin
        model[a] = rnd_cell();
        slot(2'd2, 1'b0, a, model[a]);
      end else if (k < 7) begin
        slot(2'd1, 1'b0, a, '0);
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          if (failures < 10) $display("FAIL read row %0d", a);
        end
      end else begin
        // refresh read, one idle slot, then write-back
        slot(2'd3, 1'b0, a, '0);
        slot(2'd0, 1'b0, '0, '0);
        slot(2'd3, 1'b1, '0, '0);
        refreshes++;
      end
    end
    // everything still holds after all the refreshes
    for (int r = 0; r < NROWS; r++) begin
      slot(2'd1, 1'b0, row_t'(r), '0);
      checks++;
      if (rdata !== model[r]) begin
        failures++;
        if (failures < 10) $display("FAIL final read row %0d", r);
      end
    end
    checks++;
    if (refreshes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
