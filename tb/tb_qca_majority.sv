// tb_qca_majority: exhaustive self-checking testbench for qca_majority.
//
// Tries all eight input combinations and compares y with the count of ones
// being at least two. Also checks the two uses made of the gate in this
// library: one input held at 0 gives AND of the others, held at 1 gives OR.
module tb_qca_majority;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  qca_majority dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      automatic int ones = (i & 1) + ((i >> 1) & 1) + ((i >> 2) & 1);
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (y !== (ones >= 2)) begin
        failures++;
        $display("abc=%b: y=%b, expected %b", {a, b, c}, y, ones >= 2);
      end
      checks++;
      if (c == 1'b0 && y !== (a & b) || c == 1'b1 && y !== (a | b)) begin
        failures++;
        $display("abc=%b: fixed-input AND/OR use broken", {a, b, c});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
