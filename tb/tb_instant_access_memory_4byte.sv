// tb_instant_access_memory_4byte: the memory built at 4 bytes (ADDR_WIDTH = 2),
// the size of the reference schematic: column decoder on addr[0], row decoder
// on addr[1], four cells in a 2 x 2 grid.
//
// Writes a distinct word to each address, then reads all four back, checking
// that address a lands in cell a: the cell's own register is compared through
// a hierarchical reference, and a write to one address must leave the other
// three unchanged. Then random traffic is checked against a reference array.
module tb_instant_access_memory_4byte;
  timeunit 1ns; timeprecision 1ps;

  int checks   = 0;
  int failures = 0;

  logic       Rd, Wr;
  logic [1:0] addr;
  logic [7:0] data_in;
  tri   [7:0] data_out;
  logic [7:0] ref_mem [4];
  logic [7:0] cell_word [4];

  instant_access_memory #(.ADDR_WIDTH(2), .DATA_WIDTH(8)) dut (
    .Rd(Rd), .Wr(Wr), .addr(addr), .data_in(data_in), .data_out(data_out)
  );

  assign cell_word[0] = dut.x[0].cell_data;
  assign cell_word[1] = dut.x[1].cell_data;
  assign cell_word[2] = dut.x[2].cell_data;
  assign cell_word[3] = dut.x[3].cell_data;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    Rd = 0; Wr = 0; addr = '0; data_in = '0;
    #1;
    for (int a = 0; a < 4; a++) begin
      addr = 2'(a); data_in = 8'(8'h11 * (a + 1)); Wr = 1;
      #1;
      ref_mem[a] = data_in;
      Wr = 0;
      #1;
    end
    for (int a = 0; a < 4; a++)
      check($sformatf("cell x[%0d] holds %h expected %h", a, cell_word[a], ref_mem[a]),
            cell_word[a] == ref_mem[a]);
    for (int a = 0; a < 4; a++) begin
      addr = 2'(a); Rd = 1;
      #1;
      check($sformatf("read @%0d: %h expected %h", a, data_out, ref_mem[a]), data_out == ref_mem[a]);
      Rd = 0;
      #1;
      check($sformatf("bus released after read @%0d: %h", a, data_out), data_out == '0);
    end
    for (int n = 0; n < 1000; n++) begin
      addr    = 2'($urandom);
      data_in = 8'($urandom);
      Wr      = 1'($urandom);
      Rd      = 1'($urandom);
      #1;
      if (Wr) ref_mem[addr] = data_in;
      if (Rd)
        check($sformatf("step %0d read @%0d: %h expected %h", n, addr, data_out, ref_mem[addr]),
              data_out == ref_mem[addr]);
      for (int a = 0; a < 4; a++)
        check($sformatf("step %0d cell x[%0d] %h expected %h", n, a, cell_word[a], ref_mem[a]),
              cell_word[a] == ref_mem[a]);
      Rd = 0; Wr = 0;
      #1;
    end
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
