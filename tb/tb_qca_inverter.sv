// tb_qca_inverter: self-checking testbench for qca_inverter; checks that
// both input values come out complemented.
module tb_qca_inverter;
  logic a, y;
  int checks = 0, failures = 0;

  qca_inverter dut (.a(a), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      a = 1'(i);
      #1;
      checks++;
      if (y !== ~a) begin
        failures++;
        $display("a=%b: y=%b, expected %b", a, y, ~a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
