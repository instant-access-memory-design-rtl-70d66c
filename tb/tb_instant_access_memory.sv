// tb_instant_access_memory: end-to-end test of the 16 x 8-bit clockless memory
// at its default size.
//
// Part 1 replays the reference write/read: from 10 ns Wr is high with
// addr = 0001 and data_in = 10101010; the read bus must stay released during
// the write. At 50 ns Rd rises with addr = 0001 and data_out must show
// 10101010 1 ps later, i.e. in the same instant, with no clock involved.
// Part 2 fills every address, then runs random writes, reads, idle steps and
// simultaneous Rd+Wr against a reference array kept here. Each mechanism is
// counted (write, read, released bus, overwrite, read during write, every
// address read), and one that never occurs is counted as a failure.
// A released bus reads as all zeros in a two-state simulator.
module tb_instant_access_memory;
  timeunit 1ns; timeprecision 1ps;

  localparam int AW    = 4;
  localparam int DW    = 8;
  localparam int WORDS = 2 ** AW;

  int checks   = 0;
  int failures = 0;

  logic          Rd, Wr;
  logic [AW-1:0] addr;
  logic [DW-1:0] data_in;
  tri   [DW-1:0] data_out;

  logic [DW-1:0] ref_mem [WORDS];
  bit            read_seen [WORDS];

  int n_write = 0, n_read = 0, n_idle = 0, n_overwrite = 0, n_rw = 0;

  instant_access_memory dut (
    .Rd(Rd), .Wr(Wr), .addr(addr), .data_in(data_in), .data_out(data_out)
  );

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic mechanism(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-26s %0d", what, count);
    end
  endtask

  initial begin
    // ---- part 1: the reference write at 10 ns and read at 50 ns ----
    Rd = 0; Wr = 0; addr = '0; data_in = '0;
    #10;
    Wr = 1; addr = 4'b0001; data_in = 8'b10101010;
    #1ps;
    check($sformatf("10 ns write: bus must be released, reads %h", data_out), data_out == '0);
    #20;
    Wr = 0;
    #10;
    addr = 4'b0110; data_in = 8'hFF;      // address and data move away before the read
    #10;                                   // now 50 ns
    Rd = 1; addr = 4'b0001;
    #1ps;
    check($sformatf("50 ns read at 0001: data_out %b", data_out), data_out == 8'b10101010);
    check($sformatf("read at %0t ps", $realtime * 1000), $realtime < 50.01);
    #10;
    Rd = 0;
    #1;
    check($sformatf("bus released after read: %h", data_out), data_out == '0);

    // ---- part 2: fill and random traffic ----
    for (int a = 0; a < WORDS; a++) begin
      addr = AW'(a); data_in = DW'($urandom); Wr = 1;
      #1;
      ref_mem[a] = data_in;
      n_write++;
      Wr = 0;
      #1;
    end
    for (int a = 0; a < WORDS; a++) begin
      addr = AW'(a); Rd = 1;
      #1;
      check($sformatf("fill readback @%0d: %h expected %h", a, data_out, ref_mem[a]), data_out == ref_mem[a]);
      read_seen[a] = 1;
      n_read++;
      Rd = 0;
      #1;
    end
    for (int n = 0; n < 4000; n++) begin
      int op;
      op      = $urandom_range(0, 9);
      addr    = AW'($urandom);
      data_in = DW'($urandom);
      Rd      = (op >= 4 && op <= 7) || op == 9;
      Wr      = (op <= 3) || op == 9;
      #1;
      if (Wr) begin
        ref_mem[addr] = data_in;
        n_write++;
        n_overwrite++;            // every address already holds a word
      end
      if (Rd) begin
        check($sformatf("step %0d read @%0d: %h expected %h", n, addr, data_out, ref_mem[addr]),
              data_out == ref_mem[addr]);
        read_seen[addr] = 1;
        n_read++;
        if (Wr) n_rw++;
      end else begin
        check($sformatf("step %0d bus released: %h", n, data_out), data_out == '0);
        n_idle++;
      end
      Rd = 0; Wr = 0;
      #1;
    end
    // final sweep: every word still as the reference says
    for (int a = 0; a < WORDS; a++) begin
      addr = AW'(a); Rd = 1;
      #1;
      check($sformatf("final readback @%0d: %h expected %h", a, data_out, ref_mem[a]), data_out == ref_mem[a]);
      Rd = 0;
      #1;
    end

    $display("mechanisms:");
    mechanism("write", n_write);
    mechanism("read", n_read);
    mechanism("bus released (no read)", n_idle);
    mechanism("overwrite", n_overwrite);
    mechanism("Rd and Wr together", n_rw);
    begin
      int covered = 0;
      foreach (read_seen[a]) if (read_seen[a]) covered++;
      check($sformatf("all %0d addresses read (%0d)", WORDS, covered), covered == WORDS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
