// tb_comparator_fg: self-checking testbench for comparator_fg at its default
// delay.
//
// Applies a new (A, B) pair on every tick: first all four, then a random
// stream. After each rising edge it compares Y1, Y2, Y3 with A and not B,
// A nor B and not A and B of the pair applied DELAY ticks earlier, checking
// the function and the two-zone (half QCA clock cycle) latency. It also
// counts how often each of the three outputs was seen high.
module tb_comparator_fg;
  import qca_pkg::*;

  localparam int unsigned DELAY = CMP_FG_DELAY_ZONES;
  localparam int unsigned N     = 400;

  logic clk = 1'b0;
  logic rst_n;
  logic a, b, y1, y2, y3;
  logic [1:0] hist [N];
  int checks = 0, failures = 0;
  int seen_gt = 0, seen_nor = 0, seen_lt = 0;

  always #5 clk = ~clk;

  comparator_fg dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .y1(y1), .y2(y2), .y3(y3));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    {a, b} = 2'b00;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if ({y1, y2, y3} !== 3'b000) begin
      failures++;
      $display("reset: y=%b, expected 000", {y1, y2, y3});
    end
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      hist[t] = (t < 4) ? 2'(t) : 2'($urandom_range(0, 3));
      {a, b} = hist[t];
      @(posedge clk);
      #1;
      if (t + 1 >= DELAY) begin
        automatic logic ea = hist[t+1-DELAY][1];
        automatic logic eb = hist[t+1-DELAY][0];
        checks++;
        if (y1 !== (ea & ~eb) || y2 !== ~(ea | eb) || y3 !== (~ea & eb)) begin
          failures++;
          $display("t=%0d A=%b B=%b: Y=%b%b%b, expected %b%b%b", t, ea, eb,
                   y1, y2, y3, ea & ~eb, ~(ea | eb), ~ea & eb);
        end
        seen_gt  += int'(y1);
        seen_nor += int'(y2);
        seen_lt  += int'(y3);
      end
    end
    checks++;
    if (seen_gt == 0 || seen_nor == 0 || seen_lt == 0) begin
      failures++;
      $display("an output was never high: gt=%0d nor=%0d lt=%0d",
               seen_gt, seen_nor, seen_lt);
    end
    $display("outputs high: Y1 %0d, Y2 %0d, Y3 %0d", seen_gt, seen_nor, seen_lt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
