// tb_decoder: exhaustive self-checking test of the binary to one-hot decoder.
//
// Two instances: the 1-to-2 size used by the 4-byte memory and a 3-to-8 size.
// Every input value is applied; each output bit k is compared with (a == k),
// worked out here independently of the decoder. The decoder is combinational,
// so each result is checked 1 ns after the input changes.
module tb_decoder;
  timeunit 1ns; timeprecision 1ps;

  int checks   = 0;
  int failures = 0;

  logic [0:0] a1;
  logic [1:0] b1;
  logic [2:0] a3;
  logic [7:0] b3;

  decoder #(.IN_WIDTH(1)) dut1 (.a(a1), .b(b1));
  decoder #(.IN_WIDTH(3)) dut3 (.a(a3), .b(b3));

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int v = 0; v < 2; v++) begin
      a1 = v[0:0];
      #1;
      for (int k = 0; k < 2; k++)
        check($sformatf("1-to-2 a=%0d b=%b bit %0d", v, b1, k), b1[k] == (v == k));
    end
    for (int v = 0; v < 8; v++) begin
      a3 = v[2:0];
      #1;
      for (int k = 0; k < 8; k++)
        check($sformatf("3-to-8 a=%0d b=%b bit %0d", v, b3, k), b3[k] == (v == k));
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
