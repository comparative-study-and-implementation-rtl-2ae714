// Self-checking testbench for half_adder: all four input pairs, with the
// expected sum and carry taken from the integer sum x + y.
module tb_half_adder;
  logic x, y, s, c;
  int checks = 0;
  int failures = 0;

  half_adder dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 4; i++) begin
      int total;
      {x, y} = i[1:0];
      total = int'(x) + int'(y);
      #1;
      checks++;
      if ({c, s} !== 2'(total)) begin
        failures++;
        $display("FAIL x=%b y=%b got c=%b s=%b", x, y, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
