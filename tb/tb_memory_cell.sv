// tb_memory_cell: self-checking test of one latch-based memory cell.
//
// Random Rd, Wr, row and column values and random data are applied. A
// reference word is updated here only when Wr, row and column are all high;
// after every step data_out must equal it, and enable must equal
// Rd & row & column. A write must show on data_out within the same 1 ns step
// (no clock), and the word must hold once the write strobe or either select
// line falls while data_in keeps changing.
module tb_memory_cell;
  timeunit 1ns; timeprecision 1ps;

  int checks   = 0;
  int failures = 0;
  int writes   = 0;
  int blocked  = 0;   // Wr high but the cell not selected

  logic       Rd, Wr, row, column;
  logic [7:0] data_in, data_out;
  logic       enable;
  logic [7:0] ref_word;

  memory_cell #(.DATA_WIDTH(8)) dut (
    .Rd(Rd), .Wr(Wr), .row(row), .column(column),
    .data_in(data_in), .data_out(data_out), .enable(enable)
  );

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    // first write gives the cell a known value
    Rd = 0; Wr = 1; row = 1; column = 1; data_in = 8'h5A;
    #1;
    ref_word = 8'h5A;
    writes++;
    check($sformatf("first write: data_out %h", data_out), data_out == 8'h5A);
    Wr = 0;
    #1;
    for (int n = 0; n < 500; n++) begin
      Rd      = 1'($urandom);
      Wr      = 1'($urandom);
      row     = 1'($urandom);
      column  = 1'($urandom);
      data_in = 8'($urandom);
      #1;
      if (Wr && row && column) begin
        ref_word = data_in;
        writes++;
      end else if (Wr) begin
        blocked++;
      end
      check($sformatf("step %0d: data_out %h expected %h", n, data_out, ref_word), data_out == ref_word);
      check($sformatf("step %0d: enable %b", n, enable), enable == (Rd && row && column));
      // drop the strobes, then change data_in: the word must hold
      Wr = 0;
      #1;
      data_in = ~data_in;
      #1;
      check($sformatf("step %0d hold: data_out %h expected %h", n, data_out, ref_word), data_out == ref_word);
    end
    check("writes happened", writes > 50);
    check("unselected writes happened", blocked > 50);
    $display("writes=%0d unselected_writes=%0d", writes, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
