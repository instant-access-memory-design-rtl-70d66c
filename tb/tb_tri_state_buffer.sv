// tb_tri_state_buffer: self-checking test of the bus driver.
//
// Two buffers share one bus, as neighbouring memory cells do. Random data and
// enables (at most one high) are applied; with one enabled the bus must carry
// that buffer's input, with none it must be released. In a two-state simulator
// a released bus reads as all zeros, which is what is checked then.
module tb_tri_state_buffer;
  timeunit 1ns; timeprecision 1ps;

  int checks   = 0;
  int failures = 0;

  logic       en0, en1;
  logic [7:0] x0, x1;
  tri   [7:0] bus;

  tri_state_buffer #(.DATA_WIDTH(8)) dut0 (.enable(en0), .x(x0), .y(bus));
  tri_state_buffer #(.DATA_WIDTH(8)) dut1 (.enable(en1), .x(x1), .y(bus));

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      int sel;
      sel = n % 3;                 // 0: nobody drives, 1: buffer 0, 2: buffer 1
      x0  = 8'($urandom);
      x1  = 8'($urandom);
      en0 = (sel == 1);
      en1 = (sel == 2);
      #1;
      case (sel)
        0: check($sformatf("released bus reads %h", bus), bus == 8'h00);
        1: check($sformatf("buffer 0 drives %h, bus %h", x0, bus), bus == x0);
        default: check($sformatf("buffer 1 drives %h, bus %h", x1, bus), bus == x1);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
